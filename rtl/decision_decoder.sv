// decision_decoder: recovers the decision bit of every ETI word from the
// phase detector.
//
// An inverted word always contains at least one bit period with an edge in
// its middle (the encoder guarantees it even for words without any other
// edge) and a word that was not inverted never does. The decoder therefore
// ORs the phase detector output over the WL bits of a word; the accumulator
// is restarted at the first bit by the word-length indicator.
//
// Timing: decision is combinational and valid in the cycle where last is
// high (it includes the last bit).
module decision_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic mid_edge,
  input  logic first,
  input  logic last,
  output logic decision
);

  logic seen;  // a mid-bit edge earlier in this word

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   seen <= 1'b0;
    else if (en)  seen <= first ? mid_edge : (seen | mid_edge);
  end

  assign decision = last && (first ? mid_edge : (seen | mid_edge));

endmodule
