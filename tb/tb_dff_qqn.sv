// tb_dff_qqn: checks that q takes d at a rising edge only when en is high,
// that qn is always the complement of q, and that reset clears q.
module tb_dff_qqn;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, d = 1'b0;
  logic q, qn;

  dff_qqn dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  bit model = 1'b0;

  initial begin
    @(negedge clk);
    check(q == 1'b0 && qn == 1'b1, "reset value");
    rst_n = 1'b1;
    repeat (300) begin
      d = 1'($urandom);
      en = 1'($urandom);
      @(posedge clk);
      if (en) model = d;
      @(negedge clk);
      check(q == model, "q");
      check(qn == !model, "qn");
    end
    rst_n = 1'b0;
    #1;
    check(q == 1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
