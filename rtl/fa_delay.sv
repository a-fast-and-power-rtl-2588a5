// fa_delay: behavioural model of the full-adder delay module.
//
// The self-timed adder forms the evaluation clock of each MCBA stage by
// passing the previous clock through a delay module built from a full
// adder, so that the clock tracks the full-adder delay of the summation
// array over process variation. The model contains a real full_adder cell
// with its two other inputs tied low (its sum then follows the clock) and
// adds the cell's propagation delay, DELAY in ns, as an inertial
// continuous-assignment delay. The delay value is this design's choice; the
// original circuit gives only the structure. In synthesis the delay is
// ignored and the module is a full-adder cell used as a buffer.
module fa_delay #(
  parameter real DELAY = 0.2   // full-adder sum delay in ns
) (
  input  logic clk_in,
  output logic clk_out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic fa_s, fa_co;

  full_adder u_fa (.a(clk_in), .b(1'b0), .ci(1'b0), .s(fa_s), .co(fa_co));

  assign #(DELAY) clk_out = fa_s;
endmodule
