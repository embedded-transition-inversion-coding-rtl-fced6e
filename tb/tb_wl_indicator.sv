// tb_wl_indicator: drives random enables and checks idx, first and last
// against a count of the enabled cycles modulo WL.
module tb_wl_indicator;
  localparam int WL = 4;

  logic       clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [1:0] idx;
  logic       first, last;

  wl_indicator dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  int count = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (500) begin
      en <= ($urandom % 3 != 0);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    check(idx == 2'(count % WL), "idx");
    check(first == (en && count % WL == 0), "first");
    check(last == (en && count % WL == WL - 1), "last");
  end
  always @(posedge clk) if (rst_n && en) count++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
