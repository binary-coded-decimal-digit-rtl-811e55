// bcd_multi_add: multi-operand BCD adder.
//
// Adds M unsigned BCD numbers of W digits each. Every digit column is summed in
// binary together with the decimal carry from the column to its right; the
// column sum is split into a units digit (sum mod 10) and a decimal carry
// (sum div 10) for the next column. With M operands a column sum never exceeds
// 9*M + (M-1), so the carry is below M. M = 3 is the three-operand addition of a
// sequential BCD multiplier (accumulated result plus a two-deep partial product),
// M = 5 the five-operand addition of the two-digits-per-iteration multiplier.
// The column-wise ripple structure is this design's own choice; only the
// function, a multi-operand BCD addition, is prescribed.
//
// Interface: ops (M operands of W digits) in; sum (W digits) and cout (the
// decimal carry out of the top column) out. Timing: purely combinational.
module bcd_multi_add
  import bcd_pkg::*;
#(
  parameter int M = 3,
  parameter int W = 17
) (
  input  bcd_t [M-1:0][W-1:0] ops,
  output bcd_t [W-1:0]        sum,
  output logic [7:0]          cout
);

  localparam int SW = $clog2(10 * M + 1);   // width of one column sum

  logic [SW-1:0] col;
  logic [SW-1:0] carry;

  always_comb begin
    carry = '0;
    sum   = '0;
    for (int j = 0; j < W; j++) begin
      col = carry;
      for (int m = 0; m < M; m++) col = col + SW'(ops[m][j]);
      carry  = col / SW'(10);
      sum[j] = 4'(col % SW'(10));
    end
    cout = 8'(carry);
  end

endmodule
