// tb_deserializer: sends a random serial stream, with gaps in sin_valid, and
// checks that every M valid bits come out as one parallel word (first bit on
// wire 1) one cycle after the last of them.
module tb_deserializer;
  localparam int M = 2;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         sin = 1'b0, sin_valid = 1'b0;
  logic [M-1:0] par_out;
  logic         par_valid;

  deserializer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  logic [M-1:0] exp_q[$];
  logic [M-1:0] build = '0;
  int           nbits = 0, words = 0;
  bit           due = 1'b0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    repeat (600) begin
      sin <= 1'($urandom);
      sin_valid <= ($urandom % 4 != 0);
      @(posedge clk);
    end
    sin_valid <= 1'b0;
    repeat (3) @(posedge clk);
    check(words > 100, "too few words");
    check(exp_q.size() == 0, "words missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n) check(par_valid == due, "par_valid timing");
    if (par_valid && exp_q.size() > 0) begin
      check(par_out == exp_q.pop_front(), "parallel word");
      words++;
    end
    due = 1'b0;
    if (rst_n && sin_valid) begin
      build[nbits] = sin;
      nbits++;
      if (nbits == M) begin
        exp_q.push_back(build);
        nbits = 0;
        due = 1'b1;
      end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
