// eti_top: the two transition-reducing coders side by side.
//
// u_link is the complete ETI serial link (eti_link): an M-wire bus
// serialized onto one wire, coded word by word with bit-two inversion, the
// inversion flag carried in the clock/data phase, decoded and deserialized.
// u_bi is a bus-invert encoder (bus_invert_encoder) for an N-bit parallel
// bus with its separate decision line, the parallel form of the same
// count-and-invert decision. The two share only clock and reset; each has
// its own ports. See eti_link and bus_invert_encoder for timing.
module eti_top #(
  parameter int unsigned M   = 2,
  parameter int unsigned WL  = 4,
  parameter int unsigned NTH = WL / 2,
  parameter int unsigned N   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // ETI serial link
  input  logic               en,
  input  logic [M-1:0]       par_in,
  output logic               par_take,
  output eti_pkg::line_sym_t line,
  output logic               line_valid,
  output logic               enc_decision,
  output logic               dec_decision,
  output logic [M-1:0]       par_out,
  output logic               par_out_valid,
  // bus-invert encoder
  input  logic               bi_valid,
  input  logic [N-1:0]       bi_data_in,
  output logic [N-1:0]       bi_bus,
  output logic               bi_invert,
  output logic [$clog2(N+1)-1:0] bi_transitions
);

  eti_link #(.M(M), .WL(WL), .NTH(NTH)) u_link (
    .clk, .rst_n, .en, .par_in, .par_take, .line, .line_valid,
    .enc_decision, .dec_decision, .par_out, .par_out_valid
  );

  bus_invert_encoder #(.N(N)) u_bi (
    .clk, .rst_n, .valid(bi_valid), .data_in(bi_data_in),
    .bus(bi_bus), .invert(bi_invert), .transitions(bi_transitions)
  );

endmodule
