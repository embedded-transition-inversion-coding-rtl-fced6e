// b2inv: bit-two inversion (B2INV) of a WL-bit word.
//
// The word is split into bases of two consecutive serial bits b1 b2. The
// first bit of every base passes unchanged (b_e1 = b1); the second bit is
// inverted when the decision bit inv is set (b_e2 = inv ? !b2 : b2). The
// inverted value is taken from the complement output of the buffer flip-flop
// that holds the bit, so the block is a row of 2:1 selectors. Because
// B2INV is its own inverse, the decoder uses the same block.
//
// Interface: bit k of q, qn and y is the k-th bit of the word in time
// (bit 0 is sent first); qn must be ~q. Purely combinational. WL must be even.
module b2inv #(
  parameter int unsigned WL = 4
) (
  input  logic [WL-1:0] q,
  input  logic [WL-1:0] qn,
  input  logic          inv,
  output logic [WL-1:0] y
);

  always_comb begin
    for (int k = 0; k < WL; k++) begin
      // odd positions are the second bit of a base
      y[k] = (inv && (k % 2 == 1)) ? qn[k] : q[k];
    end
  end

endmodule
