// bcd_digit_mul: BCD-digit multiplier cell.
//
// Multiplies two BCD digits X and Y and returns the product 0..81 as two BCD
// digits, B (tens, 0..8) and C (units, 0..9), with X*Y = 10*B + C. It is built as
// a binary product circuit specialised to BCD inputs followed by a converter from
// the 7-bit binary product to two BCD digits. The CELL parameter selects the
// binary product circuit:
//   CELL_DELAY - compacted partial products with carry look-ahead (shorter path)
//   CELL_AREA  - compacted partial products reduced by half/full adders (smaller)
// Both variants have the same function. The default is the area-optimised one,
// which is the variant aimed at iterative multipliers whose cycle time leaves
// room for the longer path.
//
// Interface: x, y in; b, c out; p_bin (the intermediate binary product) is brought
// out for observation. Timing: purely combinational.
module bcd_digit_mul
  import bcd_pkg::*;
#(
  parameter cell_e CELL = CELL_AREA
) (
  input  bcd_t       x,
  input  bcd_t       y,
  output bcd_t       b,
  output bcd_t       c,
  output logic [6:0] p_bin
);

  if (CELL == CELL_DELAY) begin : g_delay
    bin_prod_delay u_prod (.x(x), .y(y), .p(p_bin));
  end else begin : g_area
    bin_prod_area u_prod (.x(x), .y(y), .p(p_bin));
  end

  bin2bcd_conv u_conv (.p(p_bin), .b(b), .c(c));

endmodule
