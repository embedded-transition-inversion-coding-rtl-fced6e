// tb_check_transitions: feeds serial words through the transition checker,
// with its word-length indicator, and checks the decision bit at the last
// bit of every word against N_t >= 2, N_t counted inside the word only.
// The first 16 words are all 4-bit words in order, then random words follow.
module tb_check_transitions;
  localparam int WL = 4;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, din = 1'b0;
  logic [1:0] idx;
  logic       first, last, decision;

  wl_indicator u_wl (.clk, .rst_n, .en, .idx, .first, .last);
  check_transitions dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  int n_dec = 0;

  initial begin
    bit w[WL];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 300; r++) begin
      int nt;
      for (int k = 0; k < WL; k++) w[k] = (r < 16) ? 1'((r >> (WL - 1 - k)) & 1) : 1'($urandom);
      nt = 0;
      for (int k = 1; k < WL; k++) nt += (w[k] != w[k-1]);
      if (r % 3 == 1) begin      // an idle cycle before some words
        en <= 1'b0;
        @(posedge clk);
      end
      for (int k = 0; k < WL; k++) begin
        din <= w[k]; en <= 1'b1;
        @(negedge clk);
        if (k == WL - 1) begin
          check(last, $sformatf("last marker r=%0d idx=%0d", r, idx));
          check(decision == (nt >= 2), $sformatf("decision for word %0d nt=%0d", r, nt));
          n_dec += decision;
        end else begin
          check(!decision, "decision outside the last bit");
        end
        @(posedge clk);
      end
    end
    check(n_dec > 0, "no decision raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
