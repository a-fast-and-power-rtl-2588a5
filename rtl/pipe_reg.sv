// pipe_reg: register bank at the boundary of the MAC.
//
// The MAC datapath is combinational between an input register bank (X, Y
// and the mode bits) and an output register bank that holds the 40-bit
// result and serves as the accumulator. Both are instances of this module:
// W flip-flops loaded on every rising clock edge, cleared by an
// asynchronous active-low reset. The reset and the load-every-cycle
// behaviour are this design's choices.
module pipe_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  timeunit 1ns;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;
endmodule
