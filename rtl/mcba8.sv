// mcba8: 8-bit dynamic Manchester carry-bypass adder stage.
//
// Bit i forms generate G[i] = A[i]&B[i] and propagate P[i] = A[i]^B[i].
// The carry chain is a precharged Manchester chain: while the stage clock
// clkb is low the chain nodes are precharged and every carry output C[i]
// (taken through an output inverter) is 0; while clkb is high the chain
// evaluates and C[i] = G[i] | P[i]&C[i-1]. Carry 4 also has three bypass
// pull-downs, H = G2&P3&P4, I = G1&P2&P3&P4 and J = G0&P1&P2&P3&P4, which
// shorten the chain; they are logically redundant and do not change the
// result. Sums are S[i] = P[i]^C[i-1], S[0] = P[0]^cin.
//
// During evaluation a carry output can only stay 0 or rise from 0 to 1, so
// it is itself a valid input to the next dynamic stage and needs no
// completion detection. That is the central property of the self-timed
// adder. The stage of the original circuit has no carry input (S0 = P0);
// cin is this design's addition so that stages can be chained into a wider
// adder, and acts as a carry C[-1] into the chain. With cin = 0 the stage
// is the original one.
//
// Timing: outputs are valid only while clkb is high, after the chain has
// settled; during precharge s equals P (carries forced to 0).
module mcba8
  import mac_pkg::*;
(
  input  logic              clkb,   // 0: precharge, 1: evaluate
  input  logic [MCBA_W-1:0] a,
  input  logic [MCBA_W-1:0] b,
  input  logic              cin,
  output logic [MCBA_W-1:0] s,
  output logic [MCBA_W-1:0] c      // carry outputs C0..C7; c[7] is the stage carry-out
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [MCBA_W-1:0] g, p, ch;
  logic h, i_byp, j;

  always_comb begin
    g = a & b;
    p = a ^ b;
    h     = g[2] & p[3] & p[4];
    i_byp = g[1] & p[2] & p[3] & p[4];
    j     = g[0] & p[1] & p[2] & p[3] & p[4];
    // evaluated value of the chain (what the discharged nodes represent)
    ch[0] = g[0] | (p[0] & cin);
    ch[1] = g[1] | (p[1] & ch[0]);
    ch[2] = g[2] | (p[2] & ch[1]);
    ch[3] = g[3] | (p[3] & ch[2]);
    ch[4] = g[4] | (p[4] & g[3]) | h | i_byp | j | (p[4] & ch[3]);
    ch[5] = g[5] | (p[5] & ch[4]);
    ch[6] = g[6] | (p[6] & ch[5]);
    ch[7] = g[7] | (p[7] & ch[6]);
    // precharge forces the inverted outputs to 0
    c = clkb ? ch : '0;
    s = p ^ {c[MCBA_W-2:0], cin & clkb};
  end
endmodule
