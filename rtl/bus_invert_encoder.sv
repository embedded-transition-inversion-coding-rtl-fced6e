// bus_invert_encoder: bus-invert coding of an N-bit parallel bus, the
// transition-count-and-invert decision that ETI applies to serial words.
//
// For every new word the encoder XORs it with the value now on the bus (the
// transition vector), adds up the ones of that vector and, when the count
// is at least half the bus width, drives the complement of the word instead
// of the word itself. A separate decision line tells the receiver which of
// the two is on the bus, so a word with t transitions costs at most
// N - t < N/2 + 1 of them on the data wires. The inversion is a row of XOR
// gates controlled by the decision; the receiver XORs the bus with the
// decision line to get the word back.
//
// Threshold: invert when t >= N/2 ("if transitions count < half of the bus
// width, assign next data, else invert"); the same rule as the ETI
// threshold N_t >= N_th.
//
// Interface and timing: data_in is taken at a rising edge where valid is
// high; bus and invert change at that edge. Reset clears the bus and the
// decision line (own choice). N = 8 is the width of the worked example.
module bus_invert_encoder #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         valid,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] bus,
  output logic         invert,
  output logic [$clog2(N+1)-1:0] transitions
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [N-1:0] tvec;      // transition vector: bus XOR next data
  logic         decide;

  assign tvec = bus ^ data_in;

  // adder chain over the transition vector
  always_comb begin
    transitions = '0;
    for (int i = 0; i < N; i++) transitions = transitions + CW'(tvec[i]);
  end

  assign decide = (transitions >= CW'(N / 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus    <= '0;
      invert <= 1'b0;
    end else if (valid) begin
      bus    <= data_in ^ {N{decide}};
      invert <= decide;
    end
  end

endmodule
