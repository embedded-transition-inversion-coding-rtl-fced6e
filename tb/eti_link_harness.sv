// eti_link_harness: drives one eti_link instance with a chosen data pattern
// and checks and measures it, for the workload bench.
//
// Patterns: 0 random words, 1 binary counter, 2 correlated data (each wire
// keeps its value and flips with probability 1/8), 3 alternating words that
// make every serial word flat after coding. For NWORDS parallel words the
// harness checks that each comes out unchanged, and counts the transitions
// of the plain serial stream (the bits as serialized, one level per bit)
// against the transitions of the coded line (both half-bit levels), plus
// the words sent plain and inverted. done rises when all words are back.
module eti_link_harness #(
  parameter int M      = 2,
  parameter int WL     = 4,
  parameter int NWORDS = 4000
) (
  input  logic   clk,
  input  logic   rst_n,
  input  int     pattern,
  output logic   done,
  output int     errors,
  output longint tr_plain,
  output longint tr_eti,
  output int     n_inv,
  output int     n_plain
);
  import eti_pkg::*;

  logic         en;
  logic [M-1:0] par_in;
  logic         par_take;
  line_sym_t    line;
  logic         line_valid, enc_decision, dec_decision;
  logic [M-1:0] par_out;
  logic         par_out_valid;

  eti_link #(.M(M), .WL(WL)) dut (.*);

  logic [M-1:0] sent_q[$];
  int           n_sent = 0, n_back = 0, bitpos = 0;
  logic [M-1:0] cur = '0, cnt = '0;
  bit           last_plain = 1'b0, have_plain = 1'b0;
  bit           last_level = 1'b0, have_level = 1'b0;

  assign en = rst_n;

  // next parallel word of the pattern
  always_comb begin
    unique case (pattern)
      1:       par_in = cnt;
      2:       par_in = cur;
      3:       par_in = M'({M/2{2'b10}});   // serial 0101... every word
      default: par_in = cur;
    endcase
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      done = 1'b0; errors = 0; tr_plain = 0; tr_eti = 0; n_inv = 0; n_plain = 0;
      sent_q.delete();
      n_sent = 0; n_back = 0; bitpos = 0; cnt = '0; cur = '0;
      have_plain = 1'b0; have_level = 1'b0;
    end else begin
      if (par_take) begin
        if (n_sent < NWORDS) sent_q.push_back(par_in);
        n_sent++;
        for (int i = 0; i < M; i++) begin
          if (have_plain) tr_plain += (par_in[i] != last_plain);
          last_plain = par_in[i];
          have_plain = 1'b1;
        end
        cnt = cnt + 1'b1;
        if (pattern == 2) begin
          bit [31:0] r;
          r = $urandom;
          for (int i = 0; i < M; i++) if (r[3*i +: 3] == 3'd0) cur[i] = !cur[i];
        end else begin
          cur = M'($urandom);
        end
      end
      if (line_valid) begin
        if (have_level) tr_eti += (line.first_half != last_level);
        tr_eti += (line.first_half != line.second_half);
        last_level = line.second_half;
        have_level = 1'b1;
        if (bitpos == 0) begin
          if (enc_decision) n_inv++;
          else n_plain++;
        end
        bitpos = (bitpos + 1) % WL;
      end
      if (par_out_valid && n_back < NWORDS) begin
        if (sent_q.size() == 0 || par_out != sent_q.pop_front()) errors++;
        n_back++;
        if (n_back == NWORDS) done = 1'b1;
      end
    end
  end
endmodule
