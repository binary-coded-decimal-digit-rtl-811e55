// bin_prod_delay: delay-optimised binary product of two BCD digits.
//
// Computes p = X * Y (0..81) as seven binary bits p6..p0 for BCD digits X and Y.
// The 4x4 array of bit products x_i*y_j is first compacted with the BCD constraint
// (x3&x2 = 0 and x3&x1 = 0, likewise for Y): bit products of one column that can
// never be 1 together are merged by an OR instead of being added. The compacted
// columns are:
//
//   p6: x3y3
//   p5: x3y2 | x2y3
//   p4: x3y1 | x2y2 | x1y3
//   p3: x3y0 | x2y1 ,  x1y2 | x0y3
//   p2: x2y0 , x0y2 , x1y1 , x1y1x0y0   (the last one is the carry out of column p1)
//   p1: x1y0 xor x0y1
//   p0: x0y0
//
// The four terms of column p2 are counted directly: the count's bit 0 is p2, its
// bit 1 is the carry c into column p3, and a count of four (x2y2x1y1x0y0) is a
// carry straight into column p4. Columns p3..p5 are then added with carry
// look-ahead: both carries into p4 and p5 are formed in parallel from the column
// generate/propagate terms. For BCD inputs no carry leaves column p5, so p6 is
// x3y3 alone.
//
// The column layout, the weight-4 carry x2y2x1y1x0y0, the carry look-ahead over
// p3..p5 and the absence of a carry out of p5 follow the published circuit. The
// expressions for p2 and c are derived here from the column sum rather than from
// a closed formula.
//
// Interface: x, y BCD digits in (codes above 9 give an unspecified result),
// p[6:0] out. Timing: purely combinational.
module bin_prod_delay
  import bcd_pkg::*;
(
  input  bcd_t       x,
  input  bcd_t       y,
  output logic [6:0] p
);

  // compacted column terms
  logic a3, b3;       // column p3 (weight 8)
  logic a4, k24;      // column p4 (weight 16): OR term and the weight-4 carry from p2
  logic a5;           // column p5 (weight 32)
  logic t2a, t2b, t2c, t2d;
  logic [2:0] cnt2;   // number of ones in column p2
  logic c;            // carry from column p2 into column p3
  // look-ahead terms
  logic g3, h3, g4, h4, k3, k4;

  always_comb begin
    a3  = (x[3] & y[0]) | (x[2] & y[1]);
    b3  = (x[1] & y[2]) | (x[0] & y[3]);
    a4  = (x[3] & y[1]) | (x[2] & y[2]) | (x[1] & y[3]);
    a5  = (x[3] & y[2]) | (x[2] & y[3]);

    t2a = x[2] & y[0];
    t2b = x[0] & y[2];
    t2c = x[1] & y[1];
    t2d = x[1] & y[1] & x[0] & y[0];
    cnt2 = 3'(t2a) + 3'(t2b) + 3'(t2c) + 3'(t2d);
    c    = cnt2[1];
    k24  = cnt2[2];           // all four set: the term x2y2x1y1x0y0

    // column p3: three inputs a3, b3, c; column p4: a4, k24 and the carry from p3
    g3 = a3 & b3;            // generate with the two product terms
    h3 = a3 ^ b3;            // half sum
    g4 = a4 & k24;
    h4 = a4 ^ k24;
    k3 = g3 | (h3 & c);                    // carry into p4
    k4 = g4 | (h4 & g3) | (h4 & h3 & c);   // carry into p5, looked ahead

    p[0] = x[0] & y[0];
    p[1] = (x[1] & y[0]) ^ (x[0] & y[1]);
    p[2] = cnt2[0];
    p[3] = h3 ^ c;
    p[4] = h4 ^ k3;
    p[5] = a5 ^ k4;
    p[6] = x[3] & y[3];
  end

endmodule
