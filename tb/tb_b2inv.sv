// tb_b2inv: exhaustive check of bit-two inversion on 4-bit words: with inv
// low the word passes, with inv high bits 1 and 3 (the second bit of each
// 2-bit base) are inverted. Includes the bases of the coding rule: with
// inversion 01 -> 00, 10 -> 11, 00 -> 01, 11 -> 10.
module tb_b2inv;
  localparam int WL = 4;

  logic [WL-1:0] q, qn, y;
  logic          inv;

  b2inv dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  // base b1 b2 (b1 first in time) -> coded base when inverted
  bit [1:0] base_in  [4] = '{2'b01, 2'b10, 2'b00, 2'b11};
  bit [1:0] base_out [4] = '{2'b00, 2'b11, 2'b01, 2'b10};

  initial begin
    for (int w = 0; w < 16; w++) begin
      for (int i = 0; i < 2; i++) begin
        q = WL'(w); qn = ~q; inv = i[0];
        #1;
        check(y == (inv ? (q ^ 4'b1010) : q), $sformatf("word %b inv %b", q, inv));
      end
    end
    for (int b = 0; b < 4; b++) begin
      // place the base in time slots 0,1: q[0] = b1, q[1] = b2
      q = {2'b00, base_in[b][0], base_in[b][1]}; qn = ~q; inv = 1'b1;
      #1;
      check({y[0], y[1]} == base_out[b], $sformatf("base %b", base_in[b]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
