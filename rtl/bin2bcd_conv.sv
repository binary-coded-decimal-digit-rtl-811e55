// bin2bcd_conv: binary product of two BCD digits -> two BCD digits.
//
// The product of two BCD digits is at most 81, so its binary form p6..p0 has seven
// bits (bit 7 is always 0). Rather than a general binary-to-BCD converter, the
// weights 16, 32 and 64 of p4, p5, p6 are split into decimal-friendly parts:
//   16 = 10 + 4 + 2,  32 = 20 + 10 + 2,  64 = 40 + 20 + 4.
// That places the bits in four rows of the low digit and two rows of the high digit:
//
//   weight   80 40 20 10 |  8  4  2  1
//   row 1     0 p6 p5 p4 |  0 p2 p1 p0
//   row 2     0  0 p6 p5 |  0 p4 p4  0
//   row 3                |  0 p6 p5  0
//   row 4                | p3  0  0  0
//
// p3 sits in a row of its own so that no row of the low digit exceeds 9. The low
// rows are summed by a small BCD adder giving C and a decimal carry (0..2) that is
// added to the two high rows to give B. Because the value is at most 81, p6&p5 = 0
// and p6&p4&(p3|p2|p1) = 0, which keeps every sum small.
//
// The row layout, c0 = p0, c1 as the sum of a full adder on p1, p4, p5 and
// b3 = p6&p4 follow the published converter; how the remaining bits are reduced
// (a 5-bit column sum and a compare against 10 and 20) is this design's own choice.
//
// Interface: p[6:0] in, b (tens digit, 0..8) and c (units digit, 0..9) out.
// Timing: purely combinational.
module bin2bcd_conv
  import bcd_pkg::*;
(
  input  logic [6:0] p,
  output bcd_t       b,
  output bcd_t       c
);

  logic       fa_s, fa_co;     // full adder on the weight-2 column (p1, p4, p5)
  logic [4:0] low_sum;         // value of the four low rows, 0..19 for inputs <= 81
  logic [1:0] dcarry;          // decimal carry into the tens digit
  logic [3:0] low_adj;
  logic [2:0] high_sum;

  fa u_fa_c1 (.a(p[1]), .b(p[4]), .ci(p[5]), .s(fa_s), .co(fa_co));

  always_comb begin
    // rows 1..4 of the low digit; the weight-1 and weight-2 columns are p0 and
    // the full adder, the full adder's carry has weight 4
    low_sum = 5'(p[0]) + 5'({fa_co, fa_s, 1'b0})
            + 5'({p[2], 2'b00}) + 5'({p[4], 2'b00}) + 5'({p[6], 2'b00})
            + 5'({p[3], 3'b000});
    if (low_sum >= 5'd20)      dcarry = 2'd2;
    else if (low_sum >= 5'd10) dcarry = 2'd1;
    else                       dcarry = 2'd0;
    low_adj  = 4'(low_sum - 5'(dcarry) * 5'd10);
    // rows 1 and 2 of the high digit plus the decimal carry
    high_sum = {p[6], p[5], p[4]} + {1'b0, p[6], p[5]} + 3'(dcarry);
  end

  assign c = low_adj;
  assign b = {p[6] & p[4], high_sum[2:0]};

endmodule
