// bcd_iter_mul: iterative BCD multiplier around BCD-digit multiplier cells.
//
// Multiplies two N-digit unsigned BCD numbers, X (multiplicand) and Y
// (multiplier), into a 2N-digit product. The product register is split in a high
// half, which accumulates, and a low half, which receives the finished digits.
// It starts at zero. In each iteration K digits of Y, taken from the least
// significant end, are multiplied by the whole of X in a row of digit-multiplier
// cells. The resulting 2K-deep partial product (a units and a tens digit vector
// per multiplier digit) is added to the high half in one (2K+1)-operand BCD
// addition. Then the product register shifts right by K digits: the lowest K
// digits of the sum move into the low half and the rest becomes the new high half.
//   K = 1: sequential multiplier, three-operand addition per iteration
//   K = 2: semi-parallel multiplier, five-operand addition per iteration
// The cell variant (delay- or area-optimised) is the CELL parameter.
//
// PIPE = 1 (default) puts a register between the cell array and the adder, so
// partial product generation is a pipeline stage of its own: the cells work on
// the next multiplier digits while the adder accumulates the previous partial
// product, and the clock period is set by the slower of the two rather than by
// their sum. This costs one extra cycle of latency per multiplication. PIPE = 0
// puts cells and adder in one cycle.
//
// Control, reset and the start/done handshake are this design's own:
//   - rst_n is an asynchronous, active-low reset that clears all state.
//   - start is sampled on a rising clock edge while busy is low; that edge loads
//     X and Y and clears the product register. start while busy is ignored.
//   - The next N/K rising edges perform one iteration each (N/K + 1 edges with
//     PIPE = 1, the first of which only fills the pipeline register). After the
//     last one busy falls and done is high for one cycle; product then holds
//     X*Y until the next start.
// Operand digits must be valid BCD (0..9); an assertion checks this at start.
module bcd_iter_mul
  import bcd_pkg::*;
#(
  parameter int    N    = 16,
  parameter int    K    = 1,
  parameter cell_e CELL = CELL_AREA,
  parameter bit    PIPE = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  bcd_t [N-1:0]        x,
  input  bcd_t [N-1:0]        y,
  output logic                busy,
  output logic                done,
  output bcd_t [2*N-1:0]      product
);

  localparam int ITER = N / K;
  localparam int CW   = $clog2(ITER + 1);

  bcd_t [N-1:0]            x_q, y_q;     // multiplicand, remaining multiplier digits
  bcd_t [N-1:0]            hi_q, lo_q;   // product register, high and low halves
  logic [CW-1:0]           issue_q;      // partial products still to generate
  logic [CW-1:0]           iter_q;       // accumulations still to do

  bcd_t [2*K-1:0][N+K-1:0] pp;           // partial product from the cell array
  bcd_t [2*K-1:0][N+K-1:0] pp_q;         // same, registered (PIPE = 1)
  logic                    pp_vld_q;
  bcd_t [2*K-1:0][N+K-1:0] pp_use;       // partial product added this cycle
  logic                    acc_en;       // an accumulation happens this cycle
  bcd_t [2*K:0][N+K-1:0]   add_ops;
  bcd_t [N+K-1:0]          add_sum;
  logic [7:0]              add_cout;

  bcd_pp_gen #(.N(N), .K(K), .CELL(CELL)) u_ppg (
    .x(x_q), .y(y_q[K-1:0]), .op(pp)
  );

  always_comb begin
    if (PIPE) begin
      pp_use = pp_q;
      acc_en = pp_vld_q;
    end else begin
      pp_use = pp;
      acc_en = busy && (issue_q != '0);
    end
    add_ops             = '0;
    add_ops[2*K-1:0]    = pp_use;
    add_ops[2*K][N-1:0] = hi_q;   // accumulated result, top K digits zero
  end

  bcd_multi_add #(.M(2*K+1), .W(N+K)) u_add (
    .ops(add_ops), .sum(add_sum), .cout(add_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q      <= '0;
      y_q      <= '0;
      hi_q     <= '0;
      lo_q     <= '0;
      issue_q  <= '0;
      iter_q   <= '0;
      pp_q     <= '0;
      pp_vld_q <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        pp_vld_q <= 1'b0;
        if (start) begin
          for (int i = 0; i < N; i++) begin
            assert (is_bcd(x[i]) && is_bcd(y[i]))
              else $error("bcd_iter_mul: operand digit %0d is not BCD", i);
          end
          x_q     <= x;
          y_q     <= y;
          hi_q    <= '0;
          lo_q    <= '0;
          issue_q <= CW'(ITER);
          iter_q  <= CW'(ITER);
          busy    <= 1'b1;
        end
      end else begin
        // stage 1: digit products for the next K multiplier digits
        if (issue_q != '0) begin
          pp_q     <= pp;
          pp_vld_q <= 1'b1;
          y_q      <= {(K*4)'(0), y_q[N-1:K]};
          issue_q  <= issue_q - 1'b1;
        end else begin
          pp_vld_q <= 1'b0;
        end
        // stage 2: multi-operand BCD addition and K-digit right shift
        if (acc_en) begin
          // never fires: hi < 10^N and the partial product is below
          // (10^N - 1) * 10^K, so the sum fits in N+K digits
          assert (add_cout == 8'd0) else $error("bcd_iter_mul: accumulator overflow");
          hi_q   <= add_sum[N+K-1:K];
          lo_q   <= {add_sum[K-1:0], lo_q[N-1:K]};
          iter_q <= iter_q - 1'b1;
          if (iter_q == CW'(1)) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end

  assign product = {hi_q, lo_q};

  initial begin
    assert (N % K == 0) else $fatal(1, "bcd_iter_mul: N must be a multiple of K");
  end

endmodule
