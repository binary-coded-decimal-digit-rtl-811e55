// bcd_mul_top: BCD multipliers of three degrees of parallelism, all built on the
// same BCD-digit multiplier cell.
//
// All four multiply the same N-digit operands X and Y into a 2N-digit product:
//   u_seq_delay - sequential (one multiplier digit per iteration, N iterations)
//                 with delay-optimised cells
//   u_seq_area  - sequential with area-optimised cells
//   u_semi      - semi-parallel, two multiplier digits per iteration (N/2
//                 iterations, five-operand addition), area-optimised cells
//   u_par       - fully parallel, all N*N digit products at once, combinational,
//                 area-optimised cells
// The two sequential units are the pair whose partial product generators are
// compared in area; the semi-parallel one shows the cell used two digits at a
// time, and the fully parallel one the cell used for every digit pair at once.
// Instantiating them side by side lets one operand bus drive all four.
//
// Interface: clk, rst_n (asynchronous, active low), start (accepted by each unit
// that is idle), x and y (N BCD digits each); per unit a busy and a done flag
// and the product of each iterative unit; product_par, which follows x and y
// combinationally. Timing: the iterative units use their default pipelined
// form (partial product generation is a stage of its own), so done rises N+1
// clock edges after start for the sequential units and N/2+1 for the
// semi-parallel one.
module bcd_mul_top
  import bcd_pkg::*;
#(
  parameter int N = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  bcd_t [N-1:0]   x,
  input  bcd_t [N-1:0]   y,
  output logic           busy_seq_delay,
  output logic           done_seq_delay,
  output bcd_t [2*N-1:0] product_seq_delay,
  output logic           busy_seq_area,
  output logic           done_seq_area,
  output bcd_t [2*N-1:0] product_seq_area,
  output logic           busy_semi,
  output logic           done_semi,
  output bcd_t [2*N-1:0] product_semi,
  output bcd_t [2*N-1:0] product_par
);

  bcd_iter_mul #(.N(N), .K(1), .CELL(CELL_DELAY)) u_seq_delay (
    .clk, .rst_n, .start, .x, .y,
    .busy(busy_seq_delay), .done(done_seq_delay), .product(product_seq_delay)
  );

  bcd_iter_mul #(.N(N), .K(1), .CELL(CELL_AREA)) u_seq_area (
    .clk, .rst_n, .start, .x, .y,
    .busy(busy_seq_area), .done(done_seq_area), .product(product_seq_area)
  );

  bcd_iter_mul #(.N(N), .K(2), .CELL(CELL_AREA)) u_semi (
    .clk, .rst_n, .start, .x, .y,
    .busy(busy_semi), .done(done_semi), .product(product_semi)
  );

  bcd_par_mul #(.N(N), .CELL(CELL_AREA)) u_par (
    .x, .y, .product(product_par)
  );

endmodule
