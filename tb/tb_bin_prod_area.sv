// tb_bin_prod_area: exhaustive test of the area-optimised binary product circuit.
// All 100 pairs of BCD digits are applied and p must equal X*Y in binary.
module tb_bin_prod_area;
  import bcd_pkg::*;

  bcd_t       x, y;
  logic [6:0] p;
  int         checks = 0, failures = 0;

  bin_prod_area dut (.x(x), .y(y), .p(p));

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
        checks++;
        if (int'(p) != i * j) begin
          failures++;
          $display("FAIL %0d*%0d -> %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
