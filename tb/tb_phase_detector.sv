// tb_phase_detector: checks all four bit periods: an edge in the middle of
// the period (halves differ) is flagged, a steady period is not.
module tb_phase_detector;
  import eti_pkg::*;

  line_sym_t sym;
  logic      mid_edge;

  phase_detector dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    sym = '{first_half: 1'b0, second_half: 1'b0}; #1 check(mid_edge == 1'b0, "00");
    sym = '{first_half: 1'b0, second_half: 1'b1}; #1 check(mid_edge == 1'b1, "01");
    sym = '{first_half: 1'b1, second_half: 1'b0}; #1 check(mid_edge == 1'b1, "10");
    sym = '{first_half: 1'b1, second_half: 1'b1}; #1 check(mid_edge == 1'b0, "11");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
