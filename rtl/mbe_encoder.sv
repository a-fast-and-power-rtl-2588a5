// mbe_encoder: modified Booth (radix-4) encoder for one multiplier digit.
//
// Takes the overlapping multiplier triplet {y[2i+1], y[2i], y[2i-1]} and
// produces the digit's select lines: one (|digit| = 1), two (|digit| = 2)
// and neg (digit < 0). neg is forced low for the triplet 111 (digit 0), so
// a zero digit never produces a negated row; this keeps a zero row truly
// zero. The recoding table is the standard radix-4 table; the exact gate
// form of the glitch-free encoder is not reproduced. Combinational.
module mbe_encoder
  import mac_pkg::*;
(
  input  logic [2:0]  trip,   // {y[2i+1], y[2i], y[2i-1]}
  output booth_sel_t  sel
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    sel.one = trip[1] ^ trip[0];
    sel.two = (trip[2] & ~trip[1] & ~trip[0]) | (~trip[2] & trip[1] & trip[0]);
    sel.neg = trip[2] & ~(trip[1] & trip[0]);
  end
endmodule
