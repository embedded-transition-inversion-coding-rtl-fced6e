// tb_serializer: checks that the serializer samples the M-wire bus every M
// cycles and sends the sampled bits one per cycle, wire 1 first, starting
// the cycle after the sample; checks the take strobe period too.
module tb_serializer;
  localparam int M = 2;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [M-1:0] par_in = '0;
  logic         take, sout, sout_valid;

  serializer dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  bit exp_q[$];
  int takes = 0, last_take = -1, edge_no = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    en <= 1'b1;
    repeat (400) begin
      par_in <= M'($urandom);
      @(posedge clk);
    end
    check(takes == 200, $sformatf("take count %0d", takes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    edge_no++;
    if (sout_valid) begin
      check(exp_q.size() > 0, "serial bit with nothing sampled");
      if (exp_q.size() > 0) check(sout == exp_q.pop_front(), "serial bit order");
    end else begin
      check(exp_q.size() == 0 || !en, "sout_valid low while bits wait");
    end
    if (take) begin
      if (last_take >= 0) check(edge_no - last_take == M, "take period");
      last_take = edge_no;
      takes++;
      for (int i = 0; i < M; i++) exp_q.push_back(par_in[i]);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
