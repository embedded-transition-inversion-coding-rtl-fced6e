// eti_encoder: embedded transition inversion (ETI) encoder for one serial
// link.
//
// The serial input Din is cut into words of WL bits. While a word arrives,
// the transition checker counts the transitions N_t inside it and the bits
// are collected in a buffer. At the last bit the whole word and the decision
// bit (N_t >= NTH) are moved into a hold register of flip-flops with Q and
// Q-bar outputs. While the next word arrives, the held word is sent: B2INV
// inverts the second bit of every 2-bit base when the decision bit is set,
// and the phase encoder sends the result in phase with the clock (no
// inversion) or half a bit late (inversion), so no indication bit is added
// to the word. Check Transitions, Buffer and B2INV together are the ETIpre
// encoder; the phase encoder completes the ETI encoder.
//
// Timing: a bit sampled from din at rising edge t is driven on line from
// edge t+WL on (one word of buffering, then the output register),
// provided din_valid stays high; a low din_valid stalls the whole encoder.
// line_valid rises once the first word has been collected. Word alignment starts at reset.
// WL and NTH default to the 4-bit word and threshold 2 of the published
// ETI coding table; the buffering and the line format are this design's own.
module eti_encoder #(
  parameter int unsigned WL  = 4,
  parameter int unsigned NTH = WL / 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               din,
  input  logic               din_valid,
  output eti_pkg::line_sym_t line,
  output logic               line_valid,
  output logic               decision
);

  localparam int unsigned IW = $clog2(WL);

  logic [IW-1:0] idx;
  logic          first, last;
  logic          dec_now;

  wl_indicator #(.WL(WL)) u_wl (
    .clk, .rst_n, .en(din_valid), .idx, .first, .last
  );

  check_transitions #(.WL(WL), .NTH(NTH)) u_check (
    .clk, .rst_n, .en(din_valid), .din, .first, .last, .decision(dec_now)
  );

  // Buffer: bits 0..WL-2 of the arriving word; bit WL-1 is din at 'last'.
  logic [WL-2:0] fill;
  logic [WL-1:0] word_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       fill <= '0;
    else if (din_valid && !last)      fill[idx] <= din;
  end

  assign word_in = {din, fill};

  // Hold register with complement outputs, loaded at the last bit of a word.
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

  // B2INV and phase encoding of the held word.
  logic [WL-1:0]      coded;
  eti_pkg::line_sym_t sym;

  b2inv #(.WL(WL)) u_b2inv (
    .q(hold_q), .qn(hold_qn), .inv(hold_dec), .y(coded)
  );

  phase_encoder #(.WL(WL)) u_phase (
    .word(coded), .inv(hold_dec), .idx, .prev(line.second_half), .sym
  );

  // Line output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line       <= '0;
      line_valid <= 1'b0;
      decision   <= 1'b0;
    end else begin
      line_valid <= din_valid && loaded;
      if (din_valid && loaded) begin
        line     <= sym;
        decision <= hold_dec;
      end
    end
  end

  // Line rules, checked in simulation. They are disabled during reset, so the
  // reset net is also read by the assertions; lint notes this mix of
  // asynchronous and sampled use, which is harmless here.
  //
  // A word that is not inverted must stay in phase with the clock: no edge
  // inside a bit period.
  a_plain_in_phase: assert property (@(posedge clk) disable iff (!rst_n)
    (line_valid && !decision) |-> (line.first_half == line.second_half));

  // An inverted word is sent half a bit late: inside the word the line does
  // not change on a bit boundary.
  a_inverted_shifted: assert property (@(posedge clk) disable iff (!rst_n)
    (line_valid && decision && idx != IW'(1)) |-> (line.first_half == $past(line.second_half)));

endmodule
