// eti_link: serial link with embedded transition inversion (ETI) coding.
//
// An M-wire parallel bus is multiplexed onto one serial wire to save wires
// and coupling capacitance. Serializing raises the number of transitions,
// so the serial stream is coded: every word of WL bits whose transition count
// reaches NTH has the second bit of each 2-bit base inverted, which turns
// N_t transitions into WL-1-N_t. The decoder learns which words were inverted
// from the phase of the data against the clock (inverted words are sent
// half a bit period late), so no indication bit is added to the word.
//
//   par_in -> serializer -> eti_encoder -> line -> eti_decoder -> deserializer -> par_out
//
// line is the serial wire, given as the levels of the two halves of each bit
// period (eti_pkg::line_sym_t); line_valid travels with it as a link-up flag.
// enc_decision shows which word on the line is inverted; dec_decision is the
// decision bit the decoder recovered for the word it is now putting out.
//
// Timing: a parallel word sampled at a rising edge where par_take is high is
// driven on par_out, with par_out_valid high for one cycle, from the
// (2*WL+M+2)-th rising edge after it on (12 edges at the defaults). A new
// word is taken every M cycles while en stays high; when en drops, the
// words inside the link wait until the stream runs again. Defaults M=2, WL=4,
// NTH=2 are the configuration the ETI scheme is evaluated in; the pipelining,
// framing from reset and the two-level line description are this design's
// own.
module eti_link #(
  parameter int unsigned M   = 2,
  parameter int unsigned WL  = 4,
  parameter int unsigned NTH = WL / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic [M-1:0]       par_in,
  output logic               par_take,
  output eti_pkg::line_sym_t line,
  output logic               line_valid,
  output logic               enc_decision,
  output logic               dec_decision,
  output logic [M-1:0]       par_out,
  output logic               par_out_valid
);

  logic ser_bit, ser_valid;
  logic dec_bit, dec_valid;

  serializer #(.M(M)) u_ser (
    .clk, .rst_n, .en, .par_in, .take(par_take), .sout(ser_bit), .sout_valid(ser_valid)
  );

  eti_encoder #(.WL(WL), .NTH(NTH)) u_enc (
    .clk, .rst_n, .din(ser_bit), .din_valid(ser_valid),
    .line, .line_valid, .decision(enc_decision)
  );

  eti_decoder #(.WL(WL)) u_dec (
    .clk, .rst_n, .line, .line_valid,
    .dout(dec_bit), .dout_valid(dec_valid), .decision(dec_decision)
  );

  deserializer #(.M(M)) u_deser (
    .clk, .rst_n, .sin(dec_bit), .sin_valid(dec_valid), .par_out, .par_valid(par_out_valid)
  );

endmodule
