// booth_mac: 16-bit x 16-bit + 40-bit Booth multiplier-accumulator with a
// self-timed Manchester carry-bypass final adder.
//
// Each clock cycle the MAC computes macpp <= X*Y + (acc_clr ? 0 : macpp),
// modulo 2^40, for signed (tc = 1) or unsigned (tc = 0) 16-bit operands.
// The datapath between the input and output register banks is not
// pipelined:
//   1. pipe_reg (input)  registers X, Y, tc and acc_clr on the rising edge.
//   2. booth_pp_gen      radix-4 modified Booth encoders and decoders make 8
//                        partial-product rows, one add-term row and, in
//                        unsigned mode, a shift-term row.
//   3. wallace_tree      full-adder carry-save layers reduce those rows and
//                        the 40-bit accumulator row to a sum and a carry row.
//   4. st_mcba_adder     five dynamic 8-bit MCBA stages add the two rows.
//   5. pipe_reg (output) registers the 40-bit result, which is both the
//                        MAC output macpp and the accumulator fed back.
//
// Self-timed adder clocking: the MCBA stages precharge while the system
// clock is high (their CLKB = ~clk is low) and evaluate while it is low.
// Stage k's CLKB is CLKB delayed by 2k+1 full-adder delays, so the stages
// start evaluating one after another, each once its inputs from the
// full-adder array can be stable, and all are still evaluating at the next
// rising edge, when the output register captures the sum. adder_done is the
// clock leaving the last stage.
//
// Latency: operands presented before rising edge t appear on macpp after
// rising edge t+1; one operation per cycle. The accumulate/clear control,
// the reset and the CLKB = ~clk phase are this design's choices.
module booth_mac
  import mac_pkg::*;
#(
  parameter real FA_DELAY = 0.2   // delay of one full-adder delay module, ns
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [XW-1:0] x,
  input  logic [YW-1:0] y,
  input  logic          tc,       // 1: signed operands, 0: unsigned
  input  logic          acc_clr,  // 1: start a new sum instead of accumulating
  output logic [AW-1:0] macpp,
  output logic          adder_done
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned INW = XW + YW + 2;

  logic [XW-1:0] x_r;
  logic [YW-1:0] y_r;
  logic          tc_r, clr_r;

  pipe_reg #(.W(INW)) u_in_reg (
    .clk, .rst_n,
    .d({x, y, tc, acc_clr}),
    .q({x_r, y_r, tc_r, clr_r})
  );

  logic [NBOOTH+1:0][AW-1:0] pp_rows;
  logic [NROWS-1:0][AW-1:0]  tree_rows;
  logic [AW-1:0]             t_sum, t_carry, result;
  logic                      cout;
  logic [AW/MCBA_W-1:0]      stage_clkb;
  logic                      clkb;

  booth_pp_gen u_ppgen (.x(x_r), .y(y_r), .tc(tc_r), .rows(pp_rows));

  assign tree_rows = {(clr_r ? row_t'('0) : macpp), pp_rows};

  wallace_tree u_tree (.rows(tree_rows), .sum(t_sum), .carry(t_carry));

  assign clkb = ~clk;

  st_mcba_adder #(.W(AW), .DELAY(FA_DELAY)) u_adder (
    .clkb_in   (clkb),
    .a         (t_sum),
    .b         (t_carry),
    .cin       (1'b0),
    .s         (result),
    .cout      (cout),
    .stage_clkb(stage_clkb),
    .clkb_out  (adder_done)
  );

  pipe_reg #(.W(AW)) u_acc_reg (.clk, .rst_n, .d(result), .q(macpp));

  // The result is kept modulo 2^40, so the adder's carry-out is not used.
  // The self-timed clocking must leave every MCBA stage evaluating when the
  // output register samples: a stage still precharging would deliver P
  // instead of the sum.
  a_stages_evaluating: assert property (@(posedge clk) &stage_clkb)
    else $error("MCBA stage not evaluating at the capture edge: %b", stage_clkb);
endmodule
