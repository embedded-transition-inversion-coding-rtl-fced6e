// eti_pkg: types shared by the embedded transition inversion (ETI) link.
//
// The ETI line carries the inversion flag of each word as a phase shift of
// the data against the clock. In this RTL one bit period of the line is
// described by two levels, the level in the first half of the period and the
// level in the second half. The bit value is always the second half. A word
// that was not inverted keeps both halves equal, so the line only changes at
// bit boundaries; an inverted word is sent half a bit late, so its edges
// fall in the middle of bit periods. This two-level description is a design
// choice of this implementation that makes the phase visible to synchronous
// logic.
package eti_pkg;

  // One bit period of the serial line.
  typedef struct packed {
    logic first_half;   // line level during the first half of the bit period
    logic second_half;  // line level during the second half (the bit value)
  } line_sym_t;

endpackage
