// tb_phase_encoder: exhaustive check of the phase encoder over every 4-bit
// coded word, decision bit, bit position and previous line level. Plain
// words must keep both halves equal to the bit; inverted words must be sent
// half a bit late, and flat inverted words must get a first-half pulse.
// Afterwards every inverted word must show at least one mid-bit edge.
module tb_phase_encoder;
  import eti_pkg::*;

  localparam int WL = 4;

  logic [WL-1:0] word;
  logic          inv, prev;
  logic [1:0]    idx;
  line_sym_t     sym;

  phase_encoder dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int w = 0; w < 16; w++)
      for (int i = 0; i < 2; i++)
        for (int p = 0; p < 2; p++) begin
          bit mid_seen, expect_first;
          mid_seen = 1'b0;
          for (int k = 0; k < WL; k++) begin
            word = WL'(w); inv = i[0]; prev = p[0]; idx = 2'(k);
            #1;
            if (!inv)                    expect_first = word[k];
            else if (k > 0)              expect_first = word[k-1];
            else if (w == 0 || w == 15)  expect_first = !word[0];
            else                         expect_first = prev;
            check(sym.second_half == word[k], "second half is the bit");
            check(sym.first_half == expect_first, $sformatf("first half w=%b inv=%b k=%0d", word, inv, k));
            mid_seen |= (sym.first_half != sym.second_half);
          end
          check(mid_seen == inv, $sformatf("phase visible w=%b inv=%b prev=%b", word, inv, prev));
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
