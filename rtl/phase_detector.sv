// phase_detector: detects a phase difference between the line clock and the
// data.
//
// The receiver samples the line twice per bit period: once in the first half
// (the flip-flop on the falling clock edge) and once in the second half. The
// two samples differ only when the data changed in the middle of the bit
// period, which happens only for a word that the encoder sent half a bit
// late, i.e. an inverted word. mid_edge flags that bit period.
//
// Interface: sym holds the two samples of one bit period. Combinational.
module phase_detector (
  input  eti_pkg::line_sym_t sym,
  output logic               mid_edge
);

  assign mid_edge = sym.first_half ^ sym.second_half;

endmodule
