// wallace_tree: full-adder Wallace tree for the partial products and the
// accumulator.
//
// Eleven 40-bit rows (8 Booth rows, the add-term row, the unsigned shift
// term and the accumulator) are reduced to two rows by carry-save layers of
// full adders, grouping three rows per layer wherever possible:
//   level 1: 11 -> 8, level 2: 8 -> 6, level 3: 6 -> 4,
//   level 4: 4 -> 3,  level 5: 3 -> 2.
// sum + carry equals the sum of all input rows modulo 2^40. The final
// carry-propagate addition is left to the self-timed MCBA adder.
// The row grouping is this design's choice. Combinational.
module wallace_tree
  import mac_pkg::*;
(
  input  logic [NROWS-1:0][AW-1:0] rows,
  output logic [AW-1:0]            sum,
  output logic [AW-1:0]            carry
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [7:0][AW-1:0] l1;
  logic [5:0][AW-1:0] l2;
  logic [3:0][AW-1:0] l3;
  logic [2:0][AW-1:0] l4;

  // level 1: rows 0..8 in three groups, rows 9 and 10 pass
  for (genvar g = 0; g < 3; g++) begin : g_l1
    csa_row #(.W(AW)) u_csa (.a(rows[3*g]), .b(rows[3*g+1]), .c(rows[3*g+2]),
                             .s(l1[2*g]), .cy(l1[2*g+1]));
  end
  assign l1[6] = rows[9];
  assign l1[7] = rows[10];

  // level 2: 8 -> 6
  for (genvar g = 0; g < 2; g++) begin : g_l2
    csa_row #(.W(AW)) u_csa (.a(l1[3*g]), .b(l1[3*g+1]), .c(l1[3*g+2]),
                             .s(l2[2*g]), .cy(l2[2*g+1]));
  end
  assign l2[4] = l1[6];
  assign l2[5] = l1[7];

  // level 3: 6 -> 4
  for (genvar g = 0; g < 2; g++) begin : g_l3
    csa_row #(.W(AW)) u_csa (.a(l2[3*g]), .b(l2[3*g+1]), .c(l2[3*g+2]),
                             .s(l3[2*g]), .cy(l3[2*g+1]));
  end

  // level 4: 4 -> 3
  csa_row #(.W(AW)) u_l4 (.a(l3[0]), .b(l3[1]), .c(l3[2]), .s(l4[0]), .cy(l4[1]));
  assign l4[2] = l3[3];

  // level 5: 3 -> 2
  csa_row #(.W(AW)) u_l5 (.a(l4[0]), .b(l4[1]), .c(l4[2]), .s(sum), .cy(carry));
endmodule
