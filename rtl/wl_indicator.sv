// wl_indicator: word-length indicator of the serial ETI stream.
//
// The ETI coder works on words of WL consecutive serial bits. This block
// counts the valid bits (en high) modulo WL and tells the rest of the coder
// where each bit sits in its word: idx is the position (0 = first bit in
// time), first and last mark the first and the last bit. In the transition
// checker, first resets the transition adder. The modulo counter is the
// simplest circuit with that function; the counter structure is this
// implementation's choice.
//
// Timing: idx, first and last describe the bit presented in the same cycle;
// the count advances at the rising edge when en is high. Reset starts a new
// word.
module wl_indicator #(
  parameter int unsigned WL = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  output logic [$clog2(WL)-1:0] idx,
  output logic                  first,
  output logic                  last
);

  localparam int unsigned IW = $clog2(WL);
  localparam logic [IW-1:0] LAST_IDX = IW'(WL - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   idx <= '0;
    else if (en)  idx <= (idx == LAST_IDX) ? '0 : idx + 1'b1;
  end

  assign first = en && (idx == '0);
  assign last  = en && (idx == LAST_IDX);

endmodule
