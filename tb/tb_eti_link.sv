// tb_eti_link: end-to-end test of the ETI serial link at its default size
// (M=2 wires, 4-bit words, threshold 2).
//
// Random parallel words, with bursts of the patterns that give the special
// cases, are pushed through serializer, encoder, line, decoder and
// deserializer. The bench checks:
//  - every parallel word comes out unchanged, exactly LAT cycles after it
//    was taken;
//  - every bit period on the line equals a reference model of the coding
//    written here from the coding rules (count N_t inside the word, invert
//    the second bit of every 2-bit base when N_t >= 2, send inverted words
//    half a bit late, first bit complemented in the first half when the
//    coded word is flat);
//  - the decision bit seen at the decoder equals the encoder's;
//  - the coded line has fewer transitions than the plain serial stream.
// It counts how often each mechanism happened (word sent plain, word
// inverted, flat inverted word with the forced edge) and fails if one never
// did.
module tb_eti_link;
  import eti_pkg::*;

  localparam int M   = 2;
  localparam int WL  = 4;
  localparam int NTH = 2;
  localparam int LAT = 2 * WL + M + 3;
  localparam int NCYC = 40000;


  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic         en = 1'b0;
  logic [M-1:0] par_in = '0;
  logic         par_take;
  line_sym_t    line;
  logic         line_valid, enc_decision, dec_decision;
  logic [M-1:0] par_out;
  logic         par_out_valid;

  eti_link dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Reference model state.
  logic [M-1:0] sent_q[$];
  int           sent_t[$];
  bit           ser_q[$];      // plain serial stream
  line_sym_t    exp_sym[$];
  bit           exp_dec[$];
  bit           model_prev = 1'b0;
  int           n_plain = 0, n_inv = 0, n_flat = 0;
  longint       tr_plain = 0, tr_eti = 0;
  bit           last_plain_bit = 1'b0, have_plain = 1'b0;
  bit           last_level = 1'b0, have_level = 1'b0;
  bit           dec_seen[$];
  bit           record = 1'b1;

  task automatic model_word();
    bit w[WL];
    bit e[WL];
    int nt = 0;
    bit inv, flat;
    for (int k = 0; k < WL; k++) w[k] = ser_q.pop_front();
    for (int k = 1; k < WL; k++) nt += (w[k] != w[k-1]);
    inv = (nt >= NTH);
    for (int k = 0; k < WL; k++) e[k] = (inv && (k % 2 == 1)) ? !w[k] : w[k];
    flat = 1'b1;
    for (int k = 1; k < WL; k++) if (e[k] != e[0]) flat = 1'b0;
    if (!inv) n_plain++;
    else if (flat) n_flat++;
    else n_inv++;
    for (int k = 0; k < WL; k++) begin
      line_sym_t s;
      s.second_half = e[k];
      if (!inv)        s.first_half = e[k];
      else if (k > 0)  s.first_half = e[k-1];
      else if (flat)   s.first_half = !e[0];
      else             s.first_half = model_prev;
      exp_sym.push_back(s);
      exp_dec.push_back(inv);
    end
    model_prev = e[WL-1];
  endtask

  // Stimulus.
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    en <= 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      if ((c / 200) % 4 == 3)
        par_in <= ((c / 8) % 2 != 0) ? 2'b10 : 2'b01;   // serial 0101 / 1010 words
      else
        par_in <= M'($urandom);
      @(posedge clk);
    end
    // Keep the link running with filler words so the last recorded words
    // drain out of the pipeline; filler words are not compared on par_out.
    record = 1'b0;
    repeat (4 * LAT) begin
      par_in <= M'($urandom);
      @(posedge clk);
    end

    check(sent_q.size() == 0, "words left undelivered");
    check(n_plain > 0, "no word was sent without inversion");
    check(n_inv > 0,   "no word was inverted");
    check(n_flat > 0,  "no flat inverted word (forced phase edge) occurred");
    check(tr_eti < tr_plain, "ETI line does not reduce transitions");
    $display("words: plain=%0d inverted=%0d flat_inverted=%0d", n_plain, n_inv, n_flat);
    $display("transitions: plain serial=%0d  ETI line=%0d  (reduction %0d%%)",
             tr_plain, tr_eti, 100 - (100 * tr_eti) / tr_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitors.
  always @(posedge clk) begin
    cycle++;
    if (rst_n && par_take) begin
      if (record) begin
        sent_q.push_back(par_in);
        sent_t.push_back(cycle);
      end
      for (int i = 0; i < M; i++) begin
        ser_q.push_back(par_in[i]);
        if (have_plain) tr_plain += (par_in[i] != last_plain_bit);
        last_plain_bit = par_in[i];
        have_plain = 1'b1;
      end
      while (ser_q.size() >= WL) model_word();
    end
    if (rst_n && line_valid) begin
      line_sym_t s;
      bit d;
      if (exp_sym.size() == 0) check(1'b0, "line word with no reference");
      else begin
        s = exp_sym.pop_front();
        d = exp_dec.pop_front();
        check(line == s, $sformatf("line symbol %b expected %b", line, s));
        check(enc_decision == d, "encoder decision bit");
        dec_seen.push_back(d);
      end
      if (have_level) tr_eti += (line.first_half != last_level);
      tr_eti += (line.first_half != line.second_half);
      last_level = line.second_half;
      have_level = 1'b1;
    end
    if (rst_n && dut.u_dec.dout_valid) begin
      if (dec_seen.size() > 0) begin
        check(dec_decision == dec_seen.pop_front(), "decoder recovered the wrong decision bit");
      end
    end
    if (rst_n && par_out_valid) begin
      if (sent_q.size() == 0) check(!record, "output word that was never sent");
      else begin
        logic [M-1:0] exp;
        int t;
        exp = sent_q.pop_front();
        t = sent_t.pop_front();
        check(par_out == exp, $sformatf("par_out %b expected %b", par_out, exp));
        check(cycle - t == LAT, $sformatf("latency %0d expected %0d", cycle - t, LAT));
      end
    end
  end

  // Watchdog.
  initial begin
    repeat (NCYC + 4 * LAT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
