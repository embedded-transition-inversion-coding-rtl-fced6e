// eti_decoder: embedded transition inversion (ETI) decoder for one serial
// link.
//
// The data of each bit period (its second half) is collected into a word
// buffer while the phase detector looks for edges in the middle of bit
// periods and the decision bit decoder ORs them over the word. At the last
// bit the word and its decision bit move into a hold register of flip-flops
// with Q and Q-bar outputs, and B2INV, its own inverse, undoes the bit-two
// inversion while the word is shifted out bit by bit during the next word.
//
// Timing: a bit period sampled from line at rising edge t gives its decoded
// bit on dout from edge t+WL on while line_valid stays high; a low
// line_valid stalls the decoder. Word alignment counts from the first valid
// bit after reset. The buffering is this design's own choice.
module eti_decoder #(
  parameter int unsigned WL = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  eti_pkg::line_sym_t line,
  input  logic               line_valid,
  output logic               dout,
  output logic               dout_valid,
  output logic               decision
);

  localparam int unsigned IW = $clog2(WL);

  logic [IW-1:0] idx;
  logic          first, last;
  logic          mid_edge;
  logic          dec_now;

  wl_indicator #(.WL(WL)) u_wl (
    .clk, .rst_n, .en(line_valid), .idx, .first, .last
  );

  phase_detector u_pd (.sym(line), .mid_edge);

  decision_decoder u_dd (
    .clk, .rst_n, .en(line_valid), .mid_edge, .first, .last, .decision(dec_now)
  );

  // Word buffer of the sampled bit values.
  logic [WL-2:0] fill;
  logic [WL-1:0] word_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    fill <= '0;
    else if (line_valid && !last)  fill[idx] <= line.second_half;
  end

  assign word_in = {line.second_half, fill};

  logic [WL-1:0] hold_q, hold_qn;
  logic          hold_dec;
  logic          loaded;

  for (genvar k = 0; k < WL; k++) begin : g_hold
    dff_qqn u_ff (
      .clk, .rst_n, .en(last), .d(word_in[k]), .q(hold_q[k]), .qn(hold_qn[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_dec <= 1'b0;
      loaded   <= 1'b0;
    end else if (last) begin
      hold_dec <= dec_now;
      loaded   <= 1'b1;
    end
  end

  logic [WL-1:0] plain;

  b2inv #(.WL(WL)) u_b2inv (
    .q(hold_q), .qn(hold_qn), .inv(hold_dec), .y(plain)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= 1'b0;
      dout_valid <= 1'b0;
      decision   <= 1'b0;
    end else begin
      dout_valid <= line_valid && loaded;
      if (line_valid && loaded) begin
        dout     <= plain[idx];
        decision <= hold_dec;
      end
    end
  end

endmodule
