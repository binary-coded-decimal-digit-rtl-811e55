// tb_bcd_pp_gen: random test of the word-by-digit partial product generator.
// With N = 6 and K = 2 (one unit per cell variant), every output digit must be
// valid BCD, the low/high operands must sit at the right digit offsets, and the
// sum of all 2K operands must equal X times the K multiplier digits.
module tb_bcd_pp_gen;
  import bcd_pkg::*;
  import tb_bcd_util_pkg::*;

  localparam int N = 6;
  localparam int K = 2;

  bcd_t [N-1:0]            x;
  bcd_t [K-1:0]            y;
  bcd_t [2*K-1:0][N+K-1:0] op_d, op_a;
  int checks = 0, failures = 0;

  bcd_pp_gen #(.N(N), .K(K), .CELL(CELL_DELAY)) dut_d (.x(x), .y(y), .op(op_d));
  bcd_pp_gen #(.N(N), .K(K), .CELL(CELL_AREA))  dut_a (.x(x), .y(y), .op(op_a));

  task automatic check_ops(input string tag, input bcd_t [2*K-1:0][N+K-1:0] op,
                           input longint unsigned xv, input longint unsigned yv);
    longint unsigned s = 0, v;
    for (int m = 0; m < 2 * K; m++) begin
      v = 0;
      for (int j = N + K - 1; j >= 0; j--) begin
        checks++;
        if (op[m][j] > 4'd9) begin
          failures++;
          $display("FAIL %s op%0d digit %0d not BCD", tag, m, j);
        end
        v = v * 10 + longint'(op[m][j]);
      end
      // units digits of row k start at digit k, tens digits at k+1
      checks++;
      if (op[m][m / 2] != 4'd0 && (m % 2) == 1) begin
        failures++;
        $display("FAIL %s tens operand %0d not shifted", tag, m);
      end
      s += v;
    end
    checks++;
    if (s != xv * yv) begin
      failures++;
      $display("FAIL %s sum %0d != %0d * %0d", tag, s, xv, yv);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned xv, yv;
    for (int t = 0; t < 400; t++) begin
      xv = 0;
      yv = 0;
      for (int i = N - 1; i >= 0; i--) begin
        x[i] = 4'(t == 0 ? 9 : rand_digit());
        xv = xv * 10 + longint'(x[i]);
      end
      for (int k = K - 1; k >= 0; k--) begin
        y[k] = 4'(t == 0 ? 9 : rand_digit());
        yv = yv * 10 + longint'(y[k]);
      end
      #1;
      check_ops("delay", op_d, xv, yv);
      check_ops("area", op_a, xv, yv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
