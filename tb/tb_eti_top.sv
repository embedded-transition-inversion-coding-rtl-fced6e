// tb_eti_top: end-to-end run of the whole design at its default parameters
// (ETI link with M=2, WL=4, NTH=2 and an 8-bit bus-invert encoder).
//
// The ETI link gets random parallel words with bursts of a pattern whose
// words are flat after coding; every word must come back unchanged after
// exactly LAT cycles and the decoder must recover the encoder's decision
// bits. The bus-invert encoder gets random words at the same time; its
// decision must match a transition count made here and the word must be
// recoverable from the bus and the decision line. The bench counts each
// mechanism: ETI words sent plain, inverted, inverted and flat (forced
// phase pulse), mid-bit edges on the line, bus-invert words inverted and
// not, and fails if one never happened.
module tb_eti_top;
  import eti_pkg::*;

  localparam int M = 2, WL = 4, N = 8;
  localparam int LAT  = 2 * WL + M + 3;   // take edge to the edge that sees par_out
  localparam int NCYC = 20000;

  logic         clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [M-1:0] par_in = '0;
  logic         par_take;
  line_sym_t    line;
  logic         line_valid, enc_decision, dec_decision;
  logic [M-1:0] par_out;
  logic         par_out_valid;
  logic         bi_valid = 1'b0;
  logic [N-1:0] bi_data_in = '0;
  logic [N-1:0] bi_bus;
  logic         bi_invert;
  logic [3:0]   bi_transitions;

  eti_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  int n_plain = 0, n_inv = 0, n_flat = 0, n_mid = 0, n_bi_inv = 0, n_bi_plain = 0;
  bit record = 1'b1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    en <= 1'b1;
    for (int c = 0; c < NCYC + 4 * LAT; c++) begin
      if (c == NCYC) record = 1'b0;       // drain with filler words
      par_in     <= ((c / 100) % 5 == 4) ? 2'b10 : M'($urandom);
      bi_valid   <= ($urandom % 2 == 0);
      bi_data_in <= N'($urandom);
      @(posedge clk);
    end
    check(n_plain > 0,    "no ETI word sent plain");
    check(n_inv > 0,      "no ETI word inverted");
    check(n_flat > 0,     "no flat inverted ETI word");
    check(n_mid > 0,      "no mid-bit edge on the line");
    check(n_bi_inv > 0,   "bus invert never inverted");
    check(n_bi_plain > 0, "bus invert never sent a word as is");
    $display("ETI words: plain=%0d inverted=%0d flat=%0d, mid-bit edges=%0d; bus invert: inverted=%0d plain=%0d",
             n_plain, n_inv, n_flat, n_mid, n_bi_inv, n_bi_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ETI link monitors
  logic [M-1:0] sent_q[$];
  int           sent_t[$];
  bit           dec_q[$];
  int           cycle = 0, pos = 0;
  bit           word_flat = 1'b1, word_first = 1'b0;
  bit           wbits[WL];

  always @(posedge clk) begin
    cycle++;
    if (rst_n && par_take && record) begin
      sent_q.push_back(par_in);
      sent_t.push_back(cycle);
    end
    if (rst_n && line_valid) begin
      if (line.first_half != line.second_half) n_mid++;
      if (pos == 0) begin word_flat = 1'b1; word_first = line.second_half; end
      else if (line.second_half != word_first) word_flat = 1'b0;
      wbits[pos] = line.second_half;
      if (pos == WL - 1) begin
        // undo B2INV by hand and check the decision rule on the original word
        int nt;
        bit orig[WL];
        nt = 0;
        for (int k = 0; k < WL; k++) orig[k] = (enc_decision && k % 2 == 1) ? !wbits[k] : wbits[k];
        for (int k = 1; k < WL; k++) nt += (orig[k] != orig[k-1]);
        check(enc_decision == (nt >= 2), $sformatf("decision for a word with N_t=%0d", nt));
        if (!enc_decision) n_plain++;
        else if (word_flat) n_flat++;
        else n_inv++;
      end
      if (pos == 0) dec_q.push_back(enc_decision);
      pos = (pos + 1) % WL;
    end
    if (rst_n && dut.u_link.u_dec.dout_valid && dut.u_link.u_dec.u_wl.idx == 2'd1) begin
      // first bit of a decoded word has just been driven
      if (dec_q.size() > 0) check(dec_decision == dec_q.pop_front(), "decoder decision bit");
    end
    if (rst_n && par_out_valid && sent_q.size() > 0) begin
      int t;
      t = sent_t.pop_front();
      check(par_out == sent_q.pop_front(), "ETI link word");
      check(cycle - t == LAT, $sformatf("ETI link latency %0d", cycle - t));
    end
  end

  // bus-invert monitor
  always @(posedge clk) begin
    if (rst_n && bi_valid) begin
      int t;
      logic [N-1:0] w;
      w = bi_data_in;
      t = $countones(bi_bus ^ w);
      @(negedge clk);
      check(bi_invert == (t >= N / 2), "bus invert decision");
      check((bi_bus ^ {N{bi_invert}}) == w, "bus invert word");
      if (bi_invert) n_bi_inv++; else n_bi_plain++;
    end
  end

  initial begin
    repeat (NCYC + 4 * LAT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
