// deserializer: distributes a serial stream back onto an M-wire parallel
// bus.
//
// The serial bits are written one per valid cycle into one flip-flop per
// wire, wire 1 first; after the M-th bit of a frame the complete word is
// copied to par_out. It undoes the serializer: the stream b11 b21 ... bM1
// gives par_out[i-1] = bi1.
//
// Timing: the frame that ends with the bit valid at edge t is on par_out
// after edge t, with par_valid high for that one cycle. Frames are counted
// from the first valid bit after reset (own choice; framing is not
// described).
module deserializer #(
  parameter int unsigned M = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sin,
  input  logic         sin_valid,
  output logic [M-1:0] par_out,
  output logic         par_valid
);

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam logic [CW-1:0] LAST = CW'(M - 1);

  logic [CW-1:0] cnt;
  logic [M-1:0]  acc;
  logic [M-1:0]  word_now;

  always_comb begin
    word_now      = acc;
    word_now[cnt] = sin;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      par_out   <= '0;
      par_valid <= 1'b0;
    end else begin
      par_valid <= sin_valid && (cnt == LAST);
      if (sin_valid) begin
        acc <= word_now;
        cnt <= (cnt == LAST) ? '0 : cnt + 1'b1;
        if (cnt == LAST) par_out <= word_now;
      end
    end
  end

endmodule
