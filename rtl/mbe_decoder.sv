// mbe_decoder: modified Booth decoder (partial-product selector) for one row.
//
// From the encoder's select lines and the extended multiplicand xe (XEW bits,
// already sign- or zero-extended by one bit) it forms one PPW-bit row equal
// to 0, X, 2X, or the one's complement of X or 2X. The +1 that completes
// the two's complement negation is not added here: it leaves as the row's
// "add term" (sel.neg) and is summed in the Wallace tree. Per bit:
// pp[j] = ((one & xe[j]) | (two & xe[j-1])) ^ neg. Combinational.
module mbe_decoder
  import mac_pkg::*;
(
  input  logic [XEW-1:0] xe,
  input  booth_sel_t     sel,
  output logic [PPW-1:0] pp
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [PPW-1:0] x1, x2;  // X and 2X aligned to the row width

  always_comb begin
    x1 = {xe[XEW-1], xe};    // sign-extend by one bit
    x2 = {xe, 1'b0};
    for (int j = 0; j < PPW; j++)
      pp[j] = ((sel.one & x1[j]) | (sel.two & x2[j])) ^ sel.neg;
  end
endmodule
