// bcd_pkg: types and helpers shared by the BCD multiplier blocks.
//
// A BCD digit is four bits x3 x2 x1 x0 with value 8*x3 + 4*x2 + 2*x1 + x0 in 0..9;
// the codes 1010..1111 never occur. cell_e picks which of the two binary-product
// circuits a BCD-digit multiplier cell uses: the delay-optimised one (carry
// look-ahead over the middle columns) or the area-optimised one (a ripple of half
// and full adders). Both give the same function.
package bcd_pkg;

  typedef logic [3:0] bcd_t;

  typedef enum logic {
    CELL_DELAY = 1'b0,
    CELL_AREA  = 1'b1
  } cell_e;

  // True when a 4-bit code is a valid BCD digit.
  function automatic logic is_bcd(input logic [3:0] d);
    return d <= 4'd9;
  endfunction

endpackage
