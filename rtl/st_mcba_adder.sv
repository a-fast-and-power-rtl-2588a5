// st_mcba_adder: self-timed carry-bypass adder built from 8-bit MCBA stages.
//
// W/8 mcba8 stages are chained. The carry-out C7 of a stage is wired
// straight into the carry input of the next dynamic stage: it only stays 0
// or rises during evaluation, so no completion detector and no dual
// (true/complement) carry chain are needed. Each stage's evaluation clock is
// derived from the previous one through full-adder delay modules, following
// the 8-bit stage drawing: CLKB_in -> FA delay -> CLKB (this stage) ->
// FA delay -> CLKB_out (next stage). The first stage's CLKB_in is clkb_in.
//
// Interface: a + b + cin = {cout, s}, valid while every stage is
// evaluating and the last stage has settled. stage_clkb shows the
// evaluation clock of every stage; clkb_out is the clock leaving the last
// stage and marks that the whole adder has been released to evaluate.
// Timing: stage k starts evaluating (2k+1) FA delays after clkb_in rises
// and returns to precharge (2k+1) FA delays after clkb_in falls.
module st_mcba_adder
  import mac_pkg::*;
#(
  parameter int unsigned W     = 40,
  parameter real         DELAY = 0.2   // FA delay in ns
) (
  input  logic               clkb_in,
  input  logic [W-1:0]       a,
  input  logic [W-1:0]       b,
  input  logic               cin,
  output logic [W-1:0]       s,
  output logic               cout,
  output logic [W/MCBA_W-1:0] stage_clkb,
  output logic               clkb_out
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NST = W / MCBA_W;

  logic [NST:0]   clk_chain;   // CLKB_in of each stage, clk_chain[NST] = CLKB_out of the last
  logic [NST:0]   carry;       // carry into each stage
  logic [MCBA_W-1:0] c_st [NST];

  assign clk_chain[0] = clkb_in;
  assign carry[0]     = cin;

  for (genvar k = 0; k < NST; k++) begin : g_stage
    fa_delay #(.DELAY(DELAY)) u_dly_in  (.clk_in(clk_chain[k]), .clk_out(stage_clkb[k]));
    fa_delay #(.DELAY(DELAY)) u_dly_out (.clk_in(stage_clkb[k]), .clk_out(clk_chain[k+1]));
    mcba8 u_mcba (
      .clkb(stage_clkb[k]),
      .a   (a[k*MCBA_W +: MCBA_W]),
      .b   (b[k*MCBA_W +: MCBA_W]),
      .cin (carry[k]),
      .s   (s[k*MCBA_W +: MCBA_W]),
      .c   (c_st[k])
    );
    assign carry[k+1] = c_st[k][MCBA_W-1];
  end

  assign cout     = carry[NST];
  assign clkb_out = clk_chain[NST];
endmodule
