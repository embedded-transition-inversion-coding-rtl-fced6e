// tb_eti_decoder: drives the ETI decoder with line symbols built here from
// random words by the coding rules (N_t >= 2 inverts the second bit of every
// 2-bit base; inverted words are sent half a bit late; a flat inverted word
// gets its first bit complemented in the first half) and checks that the
// original bits come out in order, with the right decision bit and a latency
// of WL cycles. A stretch with line_valid low checks that the decoder holds.
module tb_eti_decoder;
  import eti_pkg::*;

  localparam int WL = 4;

  logic      clk = 1'b0, rst_n = 1'b0;
  line_sym_t line = '0;
  logic      line_valid = 1'b0;
  logic      dout, dout_valid, decision;

  eti_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  bit exp_bit[$], exp_dec[$];
  int n_inv = 0, n_flat = 0;

  initial begin
    bit w[WL], e[WL];
    bit prev;
    prev = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 600; r++) begin
      int nt;
      bit inv, flat;
      for (int k = 0; k < WL; k++) w[k] = 1'($urandom);
      if (r % 10 == 0) for (int k = 0; k < WL; k++) w[k] = (k % 2 == 1) ^ prev;  // flat after coding
      nt = 0;
      for (int k = 1; k < WL; k++) nt += (w[k] != w[k-1]);
      inv = (nt >= 2);
      for (int k = 0; k < WL; k++) e[k] = (inv && k % 2 == 1) ? !w[k] : w[k];
      flat = 1'b1;
      for (int k = 1; k < WL; k++) if (e[k] != e[0]) flat = 1'b0;
      n_inv += inv;
      n_flat += (inv && flat);
      for (int k = 0; k < WL; k++) begin
        exp_bit.push_back(w[k]);
        exp_dec.push_back(inv);
      end
      for (int k = 0; k < WL; k++) begin
        line_sym_t s;
        s.second_half = e[k];
        s.first_half  = !inv ? e[k] : (k > 0) ? e[k-1] : flat ? !e[0] : prev;
        if (r == 300 && k == 2) begin     // pause the line for a while
          line_valid <= 1'b0;
          line <= '0;
          repeat (5) @(posedge clk);
        end
        line <= s; line_valid <= 1'b1;
        @(posedge clk);
      end
      prev = e[WL-1];
    end
    line_valid <= 1'b0;
    repeat (3 * WL) @(posedge clk);
    check(n_inv > 0 && n_flat > 0, "stimulus lacks inverted or flat words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int edge_no = 0;
  int in_edge[$];
  int paused = 0;
  always @(posedge clk) begin
    edge_no++;
    if (line_valid) in_edge.push_back(edge_no);
    if (dout_valid && exp_bit.size() > 0) begin
      int t;
      t = in_edge.pop_front();
      check(dout == exp_bit.pop_front(), "decoded bit");
      check(decision == exp_dec.pop_front(), "decoded decision bit");
      // one word of buffering plus the output register; the pause adds 5
      if (edge_no - t != WL + 1) paused++;
      check(edge_no - t == WL + 1 || (edge_no - t == WL + 6 && paused <= WL), $sformatf("latency %0d", edge_no - t));
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
