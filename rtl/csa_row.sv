// csa_row: one carry-save (3:2) layer of the Wallace tree.
//
// W full_adder cells compress three W-bit rows into a sum row and a carry
// row. The carry row is returned already shifted one place left; the carry
// out of the top bit is dropped, so the layer is exact modulo 2^W.
// Combinational.
module csa_row #(
  parameter int unsigned W = 40
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [W-1:0] co;

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(co[i]));
  end

  assign cy = {co[W-2:0], 1'b0};
endmodule
