// tb_bcd_digit_mul: exhaustive test of the BCD-digit multiplier cell in both
// variants. For all 100 digit pairs each cell must give tens B and units C with
// 10*B + C = X*Y, and the two variants must agree on the binary product.
module tb_bcd_digit_mul;
  import bcd_pkg::*;

  bcd_t       x, y;
  bcd_t       b_d, c_d, b_a, c_a;
  logic [6:0] p_d, p_a;
  int         checks = 0, failures = 0;

  bcd_digit_mul #(.CELL(CELL_DELAY)) dut_delay (.x(x), .y(y), .b(b_d), .c(c_d), .p_bin(p_d));
  bcd_digit_mul #(.CELL(CELL_AREA))  dut_area  (.x(x), .y(y), .b(b_a), .c(c_a), .p_bin(p_a));

  task automatic check(input string tag, input int i, input int j, input bcd_t b, input bcd_t c);
    checks++;
    if (b > 4'd8 || c > 4'd9 || int'(b) * 10 + int'(c) != i * j) begin
      failures++;
      $display("FAIL %s %0d*%0d -> B=%0d C=%0d", tag, i, j, b, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10; i++) begin
      for (int j = 0; j < 10; j++) begin
        x = 4'(i);
        y = 4'(j);
        #1;
        check("delay", i, j, b_d, c_d);
        check("area", i, j, b_a, c_a);
        checks++;
        if (p_d != p_a || int'(p_a) != i * j) begin
          failures++;
          $display("FAIL binary products %0d*%0d: %0d %0d", i, j, p_d, p_a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
