// booth_pp_gen: partial-product generation of the 16x16 Booth multiplier.
//
// The multiplicand is extended by one bit (its sign bit when tc = 1, zero
// when tc = 0) so one datapath serves signed and unsigned operands. The
// multiplier is cut into 8 overlapping triplets {y[2i+1], y[2i], y[2i-1]}
// (y[-1] = 0), each recoded by an mbe_encoder and turned into an 18-bit row
// by an mbe_decoder. The rows leave aligned (row i shifted left by 2i) in
// 40-bit words.
//
// Sign extension is avoided: a row r whose sign bit s is bit 17 is worth
// {~s, r[16:0]} - 2^17, so each row keeps only its 18 bits, with the sign
// bit inverted, and the cells above it stay empty. The -2^(17+2i) of all
// eight rows add up to one constant,
// K = -(2^17 + 2^19 + ... + 2^31) mod 2^40 = 0xFF_5556_0000,
// the "add 1" cells of the array.
//
// Two more rows complete the product:
//   rows[NBOOTH]   the "MBE add terms" (the +1 of every negated row, bit 2i
//                  for row i) merged with K. The add terms occupy bits
//                  0..14 and K bits 17..39, so they never collide.
//   rows[NBOOTH+1] "unsigned mode shift term": in unsigned mode a 16-bit
//                  multiplier needs a ninth Booth digit equal to y[15]; it
//                  is +X at weight 2^16, selected by a multiplexer. In
//                  signed mode this digit is zero.
// The sum of all rows equals X*Y modulo 2^40. K is derived from this row
// layout; the exact placement of the constant cells is this design's own.
// Combinational.
module booth_pp_gen
  import mac_pkg::*;
(
  input  logic [XW-1:0]               x,
  input  logic [YW-1:0]               y,
  input  logic                        tc,    // 1: signed, 0: unsigned
  output logic [NBOOTH+1:0][AW-1:0]   rows
);
  timeunit 1ns;
  timeprecision 1ps;

  // sign-extension constant: -(sum over rows of 2^(PPW-1+2i)) modulo 2^AW
  function automatic row_t sign_const();
    row_t k = '0;
    for (int i = 0; i < NBOOTH; i++) k -= row_t'(1) << (PPW - 1 + 2*i);
    return k;
  endfunction
  localparam row_t K_SIGN = sign_const();

  logic [XEW-1:0] xe;
  logic [YW:0]    yz;                  // multiplier with y[-1] = 0 appended
  booth_sel_t     sel [NBOOTH];
  logic [PPW-1:0] pp  [NBOOTH];

  assign xe = {tc & x[XW-1], x};
  assign yz = {y, 1'b0};

  for (genvar i = 0; i < NBOOTH; i++) begin : g_row
    mbe_encoder u_enc (.trip(yz[2*i+2 -: 3]), .sel(sel[i]));
    mbe_decoder u_dec (.xe(xe), .sel(sel[i]), .pp(pp[i]));
  end

  always_comb begin
    row_t addterm;
    for (int i = 0; i < NBOOTH; i++)
      rows[i] = row_t'({~pp[i][PPW-1], pp[i][PPW-2:0]}) << (2*i);
    addterm = K_SIGN;
    for (int i = 0; i < NBOOTH; i++)
      addterm[2*i] = sel[i].neg;
    rows[NBOOTH]   = addterm;
    rows[NBOOTH+1] = (!tc && y[YW-1]) ? row_t'(xe) << YW : '0;
  end
endmodule
