// serializer: multiplexes an M-wire parallel bus onto one serial stream.
//
// One flip-flop per wire captures the parallel bus every M clock cycles and
// a multiplexer then sends the captured bits one per cycle, wire 1 first, so
// the stream reads b11 b21 ... bM1 b12 b22 ... where bij is the j-th sample
// of wire i. M = 2 is the degree of multiplexing ETI is evaluated at.
//
// Timing: while en is high, take pulses every M cycles and par_in is sampled
// at that rising edge. The sampled bits appear on sout in the M cycles after
// it, wire 1 first. sout_valid rises one cycle after the first take and stays
// high while en stays high. Dropping en stops the stream (an own choice:
// the ETI scheme does not describe idle periods).
module serializer #(
  parameter int unsigned M = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] par_in,
  output logic         take,
  output logic         sout,
  output logic         sout_valid
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam logic [CW-1:0] LAST = CW'(M - 1);

  logic [CW-1:0] cnt;    // position in the frame
  logic [M-1:0]  cap;    // one flip-flop per wire
  logic          started;
  logic [CW-1:0] sel;    // wire now on the serial output

  assign take = en && (cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      cap     <= '0;
      started <= 1'b0;
    end else if (en) begin
      cnt <= (cnt == LAST) ? '0 : cnt + 1'b1;
      if (take) begin
        cap     <= par_in;
        started <= 1'b1;
      end
    end
  end

  assign sel        = (cnt == '0) ? LAST : cnt - 1'b1;
  assign sout       = cap[sel];
  assign sout_valid = en && started;

endmodule
