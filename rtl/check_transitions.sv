// check_transitions: transition counter and decision circuit of the ETI
// encoder.
//
// A D flip-flop keeps the previous serial bit, an XOR compares it with the
// present bit and an adder accumulates the XOR outputs over the word. The
// word-length indicator resets the adder at the first bit of every word, so
// N_t counts only the WL-1 transitions inside the word. At the last bit the
// decision bit is raised when N_t >= NTH (NTH = WL/2 by default), i.e. when
// the word would have at least as many transitions as half its length; the
// encoder then applies bit-two inversion to it.
//
// Timing: decision is combinational and valid in the cycle where
// last is high (it includes the XOR of that last bit).
module check_transitions #(
  parameter int unsigned WL  = 4,
  parameter int unsigned NTH = WL / 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  din,
  input  logic                  first,
  input  logic                  last,
  output logic                  decision
);

  localparam int unsigned CW = $clog2(WL);

  logic          prev_bit;   // D-FF holding the previous serial bit
  logic          trans;      // XOR: a transition into the present bit
  logic [CW-1:0] count;      // adder: transitions so far in this word
  logic [CW-1:0] nt;         // transitions of the whole word

  assign trans = din ^ prev_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_bit <= 1'b0;
      count    <= '0;
    end else if (en) begin
      prev_bit <= din;
      count    <= first ? '0 : count + CW'(trans);
    end
  end

  // The first bit's transition belongs to the word boundary and is not counted.
  assign nt       = first ? '0 : count + CW'(trans);
  assign decision = last && (nt >= CW'(NTH));

endmodule
