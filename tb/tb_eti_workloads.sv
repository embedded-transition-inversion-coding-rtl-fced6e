// tb_eti_workloads: runs the ETI link on several data patterns (random,
// counter, correlated, flat-after-coding) at the default size M=2, WL=4 and
// also at M=4 wires, checks that every word arrives unchanged and reports
// how many transitions the coded line has against the plain serial stream.
// On random data the coded line must have fewer transitions.
module tb_eti_workloads;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   pattern = 0;

  always #5 clk = ~clk;

  logic   done2, done4;
  int     err2, err4, inv2, inv4, pl2, pl4;
  longint trp2, tre2, trp4, tre4;

  eti_link_harness #(.M(2), .WL(4)) h2 (
    .clk, .rst_n, .pattern, .done(done2), .errors(err2), .tr_plain(trp2), .tr_eti(tre2),
    .n_inv(inv2), .n_plain(pl2));
  eti_link_harness #(.M(4), .WL(4)) h4 (
    .clk, .rst_n, .pattern, .done(done4), .errors(err4), .tr_plain(trp4), .tr_eti(tre4),
    .n_inv(inv4), .n_plain(pl4));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  string names[4] = '{"random", "counter", "correlated", "flat-after-coding"};

  initial begin
    for (int p = 0; p < 4; p++) begin
      pattern = p;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      wait (done2 && done4);
      @(posedge clk);
      check(err2 == 0, $sformatf("%s m=2: %0d words corrupted", names[p], err2));
      check(err4 == 0, $sformatf("%s m=4: %0d words corrupted", names[p], err4));
      $display("%-18s m=2: serial %0d, ETI %0d transitions (%0d%% fewer), words inverted %0d of %0d",
               names[p], trp2, tre2, 100 - 100 * tre2 / (trp2 > 0 ? trp2 : 1), inv2, inv2 + pl2);
      $display("%-18s m=4: serial %0d, ETI %0d transitions (%0d%% fewer), words inverted %0d of %0d",
               names[p], trp4, tre4, 100 - 100 * tre4 / (trp4 > 0 ? trp4 : 1), inv4, inv4 + pl4);
      if (p == 0) begin
        check(tre2 < trp2, "random data m=2: no transition reduction");
        check(tre4 < trp4, "random data m=4: no transition reduction");
      end
      if (p == 3) check(inv2 > 0, "flat-after-coding pattern inverted nothing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
