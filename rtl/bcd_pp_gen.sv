// bcd_pp_gen: word-by-digit partial product generator built only from
// BCD-digit multiplier cells.
//
// Multiplies the N-digit BCD multiplicand X by K BCD digits of the multiplier
// (K = 1 for a sequential multiplier, K = 2 for the two-digits-per-iteration
// semi-parallel one). Every digit product X_i * Y_k comes from one cell as a tens
// digit P^h and a units digit P^l. The partial product for Y_k is therefore kept
// two deep, as two digit vectors, and nothing is added here:
//   op[2k]   = P^l digits of X*Y_k, shifted left k digits
//   op[2k+1] = P^h digits of X*Y_k, shifted left k+1 digits
// Each operand is N+K digits wide, zero filled, ready for a multi-operand BCD
// adder. This gives 2K operands; the accumulated result makes one more.
//
// Interface: x (N digits), y (K digits) in; op (2K operands of N+K digits) out.
// Timing: purely combinational, one cell delay.
module bcd_pp_gen
  import bcd_pkg::*;
#(
  parameter int    N    = 16,
  parameter int    K    = 1,
  parameter cell_e CELL = CELL_AREA
) (
  input  bcd_t [N-1:0]                x,
  input  bcd_t [K-1:0]                y,
  output bcd_t [2*K-1:0][N+K-1:0]     op
);

  bcd_t [K-1:0][N-1:0] ph, pl;

  for (genvar k = 0; k < K; k++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_cell
      logic [6:0] p_unused;
      bcd_digit_mul #(.CELL(CELL)) u_cell (
        .x(x[i]), .y(y[k]), .b(ph[k][i]), .c(pl[k][i]), .p_bin(p_unused)
      );
    end
  end

  always_comb begin
    op = '0;
    for (int k = 0; k < K; k++) begin
      for (int i = 0; i < N; i++) begin
        op[2*k][i+k] = pl[k][i];
        if (i + k + 1 < N + K) op[2*k+1][i+k+1] = ph[k][i];
      end
    end
  end

endmodule
