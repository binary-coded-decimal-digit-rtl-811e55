// bcd_par_mul: fully parallel (combinational) BCD multiplier.
//
// Multiplies two N-digit unsigned BCD numbers in one pass: all N*N digit
// products X_i * Y_j are formed at once by BCD-digit multiplier cells, which
// gives 2N partial product rows (a units and a tens row per multiplier digit,
// the two-deep partial products of the paper-and-pencil scheme). These rows are
// then added together by one multi-operand BCD adder into the 2N-digit product.
// The cells and the row layout are shared with the iterative multipliers; the
// reduction, a single column-wise decimal addition of all rows, is this design's
// own simple choice where a dedicated reduction tree would normally be used.
//
// Interface: x, y (N BCD digits each) in; product (2N digits) out.
// Timing: purely combinational; register the inputs and output around it for a
// clocked design.
module bcd_par_mul
  import bcd_pkg::*;
#(
  parameter int    N    = 16,
  parameter cell_e CELL = CELL_AREA
) (
  input  bcd_t [N-1:0]   x,
  input  bcd_t [N-1:0]   y,
  output bcd_t [2*N-1:0] product
);

  bcd_t [2*N-1:0][2*N-1:0] rows;
  logic [7:0]              cout_unused;

  bcd_pp_gen #(.N(N), .K(N), .CELL(CELL)) u_ppg (.x(x), .y(y), .op(rows));

  bcd_multi_add #(.M(2*N), .W(2*N)) u_add (
    .ops(rows), .sum(product), .cout(cout_unused)
  );

endmodule
