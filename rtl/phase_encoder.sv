// phase_encoder: embeds the decision bit of a word in the phase between the
// line clock and the data.
//
// A word that was not inverted is sent in phase: both halves of each bit
// period carry the bit. An inverted word is sent half a bit period late: the
// first half of bit k carries bit k-1 (for k = 0 the last level already on
// the line, prev) and the second half carries bit k, so every edge of the
// word falls in the middle of a bit period, which the receiver's phase
// detector sees. An inverted word without any edge (all zeros or all ones
// after B2INV) could not show its phase, so its first bit is sent as its
// complement during the first half of the bit period. This gives one extra
// pulse at most and keeps every word decodable. The second half of every bit
// period is the coded bit, so a receiver sampling late in the period reads
// the B2INV output unchanged.
//
// Interface: word is the coded word (bit 0 first), inv its decision bit,
// idx the bit to send now. Purely combinational; the encoder registers sym.
module phase_encoder #(
  parameter int unsigned WL = 4
) (
  input  logic [WL-1:0]         word,
  input  logic                  inv,
  input  logic [$clog2(WL)-1:0] idx,
  input  logic                  prev,
  output eti_pkg::line_sym_t    sym
);

  logic flat;     // coded word has no edge
  logic bit_now;  // bit idx of the word
  logic bit_before;

  assign flat       = (word == '0) || (word == '1);
  assign bit_now    = word[idx];
  assign bit_before = (idx == '0) ? (flat ? ~word[0] : prev) : word[idx - 1'b1];

  always_comb begin
    sym.second_half = bit_now;
    sym.first_half  = inv ? bit_before : bit_now;
  end

endmodule
