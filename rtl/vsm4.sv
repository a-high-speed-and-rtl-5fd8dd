// vsm4: 4x4-bit signed (two's complement) Vedic multiplier, compressor style.
//
// Partial products follow the "vertical and crosswise" column sums of the
// Urdhva Tiryakbhayam method, modified for signed operands: the products
// x3*yj and xi*y3 (i, j < 3) enter complemented, x3*y3 enters true, and a
// constant 1 is added in columns 4 and 7 (p = x*y mod 256):
//   col0: x0y0                      col4: 1, (x3y1)', x2y2, (x1y3)'
//   col1: x1y0, x0y1                col5: (x3y2)', (x2y3)'
//   col2: x2y0, x1y1, x0y2          col6: x3y3
//   col3: (x3y0)', x2y1, x1y2, (x0y3)'   col7: 1
// The columns are reduced by 13 full adders, alternating Type 0-1 (inverted
// carry out) and Type 1-0 (inverted carry in) so every carry wire between
// two cells is in the polarity the receiving cell expects. The cell-by-cell
// wiring (names s01..s07, c01..c07, fc2..fc8) follows the specified
// multiplier schematic; constant inputs are tied as drawn there. The carry
// out of the last cell is dropped. Combinational.
module vsm4
  import mac_pkg::*;
(
  input  logic [IN_W-1:0]   x,
  input  logic [IN_W-1:0]   y,
  output logic [PROD_W-1:0] p
);
  // Partial products (pp[i][j] = xi & yj).
  logic [3:0][3:0] pp;
  always_comb
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++)
        pp[i][j] = x[i] & y[j];

  // Complemented partial products of the sign row and column.
  logic x3y0_n, x3y1_n, x3y2_n, x0y3_n, x1y3_n, x2y3_n, x0y2_n;
  always_comb begin
    x3y0_n = ~pp[3][0];
    x3y1_n = ~pp[3][1];
    x3y2_n = ~pp[3][2];
    x0y3_n = ~pp[0][3];
    x1y3_n = ~pp[1][3];
    x2y3_n = ~pp[2][3];
    x0y2_n = ~pp[0][2];  // fed to an inverted carry pin, so it adds x0y2
  end

  // Inter-cell wires. Names ending in a Type 0-1 output (c03, c05, fc2,
  // fc5, fc7) carry inverted carries; the rest are true.
  logic s01, s02, s03, s04, s06, s07;
  logic c01, c03, c04, c05, c06, c07;
  logic fc2, fc4, fc5, fc6, fc7, fc8;
  logic unused_c;

  // First row of cells.
  fa_type10 u_a (.a(x3y2_n),  .b(x2y3_n),  .cin_n(fc2),   .sum(s01),  .cout(c01));
  fa_type01 u_b (.a(x1y3_n),  .b(x3y1_n),  .cin(pp[2][2]), .sum(s02), .cout_n(fc2));
  fa_type01 u_c (.a(pp[1][2]), .b(pp[2][1]), .cin(x0y3_n), .sum(s03), .cout_n(c03));
  fa_type10 u_d (.a(pp[2][0]), .b(pp[1][1]), .cin_n(x0y2_n), .sum(s04), .cout(c04));
  fa_type01 u_e (.a(pp[1][0]), .b(pp[0][1]), .cin(1'b0),   .sum(p[1]), .cout_n(c05));

  // Second row: the constant 1 of column 4, and (x3y0)' of column 3.
  fa_type10 u_f (.a(s02), .b(1'b1),   .cin_n(c03),  .sum(s06), .cout(c06));
  fa_type10 u_g (.a(s03), .b(x3y0_n), .cin_n(1'b1), .sum(s07), .cout(c07));

  // Final ripple row producing p[2]..p[7].
  fa_type10 u_h (.a(s04),      .b(1'b0), .cin_n(c05), .sum(p[2]), .cout(fc4));
  fa_type01 u_i (.a(s07),      .b(c04),  .cin(fc4),   .sum(p[3]), .cout_n(fc5));
  fa_type10 u_j (.a(s06),      .b(c07),  .cin_n(fc5), .sum(p[4]), .cout(fc6));
  fa_type01 u_k (.a(s01),      .b(c06),  .cin(fc6),   .sum(p[5]), .cout_n(fc7));
  fa_type10 u_l (.a(pp[3][3]), .b(c01),  .cin_n(fc7), .sum(p[6]), .cout(fc8));
  fa_type01 u_m (.a(1'b1),     .b(1'b0), .cin(fc8),   .sum(p[7]), .cout_n(unused_c));

  assign p[0] = pp[0][0];
endmodule
