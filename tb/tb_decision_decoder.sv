// tb_decision_decoder: feeds random mid-bit edge patterns, word by word with
// a word-length indicator, and checks that the decision at the last bit is
// the OR of the flags of that word only.
module tb_decision_decoder;
  localparam int WL = 4;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0, mid_edge = 1'b0;
  logic [1:0] idx;
  logic       first, last, decision;

  wl_indicator u_wl (.clk, .rst_n, .en, .idx, .first, .last);
  decision_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int r = 0; r < 300; r++) begin
      bit any;
      any = 1'b0;
      for (int k = 0; k < WL; k++) begin
        mid_edge <= ($urandom % 6 == 0);
        en <= 1'b1;
        @(negedge clk);
        any |= mid_edge;
        if (k == WL - 1) check(decision == any, $sformatf("word %0d", r));
        else             check(!decision, "decision before the last bit");
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
