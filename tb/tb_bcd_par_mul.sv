// tb_bcd_par_mul: test of the fully parallel BCD multiplier at N = 4 digits
// with each cell variant (all 10^4 x 10^4 pairs would be too many, so every
// multiplicand 0..9999 is paired with a random multiplier, plus corner cases)
// and at N = 16 with random operands against a schoolbook reference.
module tb_bcd_par_mul;
  import bcd_pkg::*;
  import tb_bcd_util_pkg::*;

  bcd_t [3:0]  xs, ys;
  bcd_t [7:0]  ps_d, ps_a;
  bcd_t [15:0] xl, yl;
  bcd_t [31:0] pl;
  int checks = 0, failures = 0;

  bcd_par_mul #(.N(4), .CELL(CELL_DELAY)) dut_d (.x(xs), .y(ys), .product(ps_d));
  bcd_par_mul #(.N(4), .CELL(CELL_AREA))  dut_a (.x(xs), .y(ys), .product(ps_a));
  bcd_par_mul #(.N(16))                   dut_l (.x(xl), .y(yl), .product(pl));

  function automatic int val4(input bcd_t [3:0] d);
    return int'(d[3]) * 1000 + int'(d[2]) * 100 + int'(d[1]) * 10 + int'(d[0]);
  endfunction

  function automatic longint val8(input bcd_t [7:0] d);
    longint v = 0;
    for (int j = 7; j >= 0; j--) v = v * 10 + longint'(d[j]);
    return v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dnum_t a, b, r;
    int yv;
    bit ok;
    for (int xv = 0; xv < 10000; xv++) begin
      yv = (xv % 7 == 0) ? 9999 : $urandom_range(9999, 0);
      for (int j = 0, v = xv, w = yv; j < 4; j++, v /= 10, w /= 10) begin
        xs[j] = 4'(v % 10);
        ys[j] = 4'(w % 10);
      end
      #1;
      checks++;
      if (val8(ps_d) != longint'(xv) * yv || val8(ps_a) != longint'(xv) * yv) begin
        failures++;
        $display("FAIL N=4 %0d * %0d -> %0d / %0d", xv, yv, val8(ps_d), val8(ps_a));
      end
    end
    for (int t = 0; t < 200; t++) begin
      clear(a);
      clear(b);
      for (int i = 0; i < 16; i++) begin
        a[i] = (t == 0) ? 9 : rand_digit();
        b[i] = (t == 0) ? 9 : rand_digit();
        xl[i] = 4'(a[i]);
        yl[i] = 4'(b[i]);
      end
      #1;
      mul_ref(a, b, 16, r);
      ok = 1'b1;
      for (int j = 0; j < 32; j++) if (int'(pl[j]) != int'(r[j])) ok = 1'b0;
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL N=16 product mismatch in test %0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
