// tb_bus_invert_encoder: replays the worked 8-bit example (bus 10101011,
// next word 01110101: 6 transitions, so the complement 10001010 is sent with
// the decision line high, leaving 2 transitions), then random words. For
// every word it checks the decision against a transition count made here,
// that bus XOR decision gives the word back, and that the data wires never
// toggle more than N/2 times.
module tb_bus_invert_encoder;
  localparam int N = 8;

  logic         clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [N-1:0] data_in = '0;
  logic [N-1:0] bus;
  logic         invert;
  logic [3:0]   transitions;

  bus_invert_encoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures <= 10) $display("FAIL: %s", what); end
  endtask

  // bit No. 1..8 of the example, left to right, is data[0]..data[7]
  function automatic logic [N-1:0] bits(string s);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

  int n_inv = 0, n_plain = 0;

  task automatic send(input logic [N-1:0] w);
    logic [N-1:0] prev_bus;
    int t;
    prev_bus = bus;
    t = $countones(prev_bus ^ w);
    data_in <= w; valid <= 1'b1;
    @(posedge clk);
    valid <= 1'b0;
    @(negedge clk);
    check(invert == (t >= N / 2), $sformatf("decision for %b after %b (t=%0d)", w, prev_bus, t));
    check((bus ^ {N{invert}}) == w, "word not recoverable from bus and decision line");
    check($countones(bus ^ prev_bus) <= N / 2, "more than N/2 transitions on the bus");
    if (invert) n_inv++; else n_plain++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    send(bits("00000011"));
    send(bits("10101011"));
    check(bus == bits("10101011") && !invert, "example: current data on bus");
    send(bits("01110101"));
    check(invert, "example: decision bit");
    check(bus == bits("10001010"), "example: complement sent");
    check($countones(bus ^ bits("10101011")) == 2, "example: transitions reduced to N - t = 2");
    repeat (500) send(N'($urandom));
    check(n_inv > 0 && n_plain > 0, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
