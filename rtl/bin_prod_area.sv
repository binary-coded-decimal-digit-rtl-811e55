// bin_prod_area: area-optimised binary product of two BCD digits.
//
// Computes p = X * Y (0..81) as seven binary bits p6..p0 for BCD digits X and Y,
// using the same BCD-constraint compaction of the bit-product array as the
// delay-optimised circuit (mutually exclusive terms of one column merged by OR),
// but reducing the columns with a two-row array of half and full adders:
//
//   row 1 (right to left): HA(x0y1, x1y0)              -> p1, carry c1
//                          FA(x0y2, x2y0, c1)          -> s2, carry c2
//                          FA(x2y1|x0y3, x1y2|x3y0, c2) -> s3, carry c3
//                          HA(x3y1|x2y2|x1y3, c3)      -> s4, carry c4
//                          HA(x3y2|x2y3, c4)           -> s5, carry c5
//   row 2 (right to left): HA(s2, x1y1) -> p2, carry d2
//                          HA(s3, d2)   -> p3, carry d3
//                          HA(s4, d3)   -> p4, carry d4
//                          HA(s5, d4)   -> p5, carry d5
//   p6 = x3y3 merged with the two carries c5 and d5 out of column p5;  p0 = x0y0.
//
// The three weight-64 terms are mutually exclusive for BCD inputs (the product
// never exceeds 81), so they are merged by an OR. The carry ripples through the
// second row, so p6 is the slowest output. The adder arrangement and the grouping
// of the bit products follow the published area-optimised circuit.
//
// Interface: x, y BCD digits in (codes above 9 give an unspecified result),
// p[6:0] out. Timing: purely combinational.
module bin_prod_area
  import bcd_pkg::*;
(
  input  bcd_t       x,
  input  bcd_t       y,
  output logic [6:0] p
);

  logic or3a, or3b, or4, or5;
  logic c1;                  // row 1 carries
  logic s2, c2, s3, c3, s4, c4, s5, c5;
  logic d2, d3, d4, d5;      // row 2 carries

  assign or3a = (x[2] & y[1]) | (x[0] & y[3]);
  assign or3b = (x[1] & y[2]) | (x[3] & y[0]);
  assign or4  = (x[3] & y[1]) | (x[2] & y[2]) | (x[1] & y[3]);
  assign or5  = (x[3] & y[2]) | (x[2] & y[3]);

  // row 1
  ha u_ha1 (.a(x[0] & y[1]), .b(x[1] & y[0]), .s(p[1]), .c(c1));
  fa u_fa2 (.a(x[0] & y[2]), .b(x[2] & y[0]), .ci(c1), .s(s2), .co(c2));
  fa u_fa3 (.a(or3a), .b(or3b), .ci(c2), .s(s3), .co(c3));
  ha u_ha4 (.a(or4), .b(c3), .s(s4), .c(c4));
  ha u_ha5 (.a(or5), .b(c4), .s(s5), .c(c5));

  // row 2
  ha u_hb2 (.a(s2), .b(x[1] & y[1]), .s(p[2]), .c(d2));
  ha u_hb3 (.a(s3), .b(d2), .s(p[3]), .c(d3));
  ha u_hb4 (.a(s4), .b(d3), .s(p[4]), .c(d4));
  ha u_hb5 (.a(s5), .b(d4), .s(p[5]), .c(d5));

  assign p[6] = (x[3] & y[3]) | c5 | d5;
  assign p[0] = x[0] & y[0];

endmodule
