// dff_qqn: D flip-flop with true (q) and complement (qn) outputs.
//
// The cell is the master-slave D flip-flop: a master latch that follows d
// while the clock is low and a slave latch that follows the master while the
// clock is high, giving a rising-edge flip-flop whose two cross-coupled slave
// gates deliver Q and Q-bar at once. The ETI buffer uses it so that an
// inverted bit is read from qn instead of passing through an extra inverter.
// Here the cell is written at register level; the gate netlist is left to the
// cell library. The load enable and the asynchronous active-low reset (which
// clears q) are choices of this implementation.
//
// Timing: q takes d at the rising clock edge when en is high; qn == ~q always.
module dff_qqn (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q,
  output logic qn
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= d;
  end

  assign qn = ~q;

endmodule
