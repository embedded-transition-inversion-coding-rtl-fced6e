// tb_eti_encoder: checks the ETI encoder against the 16-row coding table for
// two serialized 2-bit streams (word = b11 b21 b12 b22), then against random
// words.
//
// For every table row the bench checks the coded bits (second half of each
// bit period) against the ETIpre column, the decision bit against the
// indication bit of the TIC column, and the line level at the start of the
// first bit against the ETI column where the table fixes it (words not
// inverted, and the two flat inverted words 0000 -> 1000, 1111 -> 0111).
// It also checks that inverted words carry edges only in the middle of bit
// periods and plain words only at bit boundaries, and the WL-cycle latency.
module tb_eti_encoder;
  import eti_pkg::*;

  localparam int WL = 4;

  logic      clk = 1'b0, rst_n = 1'b0;
  logic      din = 1'b0, din_valid = 1'b0;
  line_sym_t line;
  logic      line_valid, decision;

  eti_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  // Table rows: stream1 b11b12, stream2 b21b22, ETIpre word, TIC indication, ETI word.
  string s1  [16] = '{"00","00","00","00","01","01","01","01","10","10","10","10","11","11","11","11"};
  string s2  [16] = '{"00","01","10","11","00","01","10","11","00","01","10","11","00","01","10","11"};
  string pre [16] = '{"0000","0001","0001","0000","0111","0011","0011","0111",
                      "1000","1100","1100","1000","1111","1110","1110","1111"};
  string bex [16] = '{"0","0","1","1","1","0","1","0","0","1","0","1","1","1","0","0"};
  string eti [16] = '{"0000","0001","0001","1000","0111","0011","0011","0111",
                      "1000","1100","1100","1000","0111","1110","1110","1111"};

  bit in_bits[$];
  bit exp_pre[$], exp_dec[$], exp_first[$], first_known[$];
  int in_edge[$];
  int edge_no = 0;

  function automatic bit ch(string s, int i);
    return s[i] == "1";
  endfunction

  initial begin
    bit w[WL];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    // table rows, then random words
    for (int r = 0; r < 16 + 400; r++) begin
      int nt;
      bit inv;
      if (r < 16) begin
        w[0] = ch(s1[r], 0); w[1] = ch(s2[r], 0); w[2] = ch(s1[r], 1); w[3] = ch(s2[r], 1);
        for (int k = 0; k < WL; k++) begin
          exp_pre.push_back(ch(pre[r], k));
          exp_dec.push_back(ch(bex[r], 0));
          exp_first.push_back(ch(eti[r], k));
          // first half of bit k is fixed by the table only for plain words
          // and, for bit 0, for the flat inverted words
          first_known.push_back(!ch(bex[r], 0) || (k == 0 && (pre[r] == "0000" || pre[r] == "1111")));
        end
      end else begin
        for (int k = 0; k < WL; k++) w[k] = 1'($urandom);
        nt = 0;
        for (int k = 1; k < WL; k++) nt += (w[k] != w[k-1]);
        inv = (nt >= 2);
        for (int k = 0; k < WL; k++) begin
          exp_pre.push_back((inv && k % 2 == 1) ? !w[k] : w[k]);
          exp_dec.push_back(inv);
          exp_first.push_back(1'b0);
          first_known.push_back(1'b0);
        end
      end
      for (int k = 0; k < WL; k++) begin
        din <= w[k]; din_valid <= 1'b1;
        @(posedge clk);
      end
    end
    din_valid <= 1'b0;
    repeat (3 * WL) @(posedge clk);
    check(exp_pre.size() <= WL, "words not sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit prev_level = 1'b0;
  int bitpos = 0;
  always @(posedge clk) begin
    edge_no++;
    if (din_valid) in_edge.push_back(edge_no);
    if (line_valid && exp_pre.size() > 0) begin
      bit p, d, f, fk;
      int t;
      p = exp_pre.pop_front(); d = exp_dec.pop_front();
      f = exp_first.pop_front(); fk = first_known.pop_front();
      t = in_edge.pop_front();
      check(line.second_half == p, $sformatf("coded bit %0d", checks));
      check(decision == d, "decision bit");
      if (fk) check(line.first_half == f, "first-half level vs ETI column");
      // edge placement: plain words change only at bit boundaries
      if (!d) check(line.first_half == line.second_half, "mid-bit edge in a plain word");
      else if (bitpos != 0) check(line.first_half == prev_level, "boundary edge inside an inverted word");
      // latency: sampled at edge t, on the line from edge t+WL, seen here at t+WL+1
      check(edge_no - t == WL + 1, $sformatf("latency %0d", edge_no - t));
      prev_level = line.second_half;
      bitpos = (bitpos + 1) % WL;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
