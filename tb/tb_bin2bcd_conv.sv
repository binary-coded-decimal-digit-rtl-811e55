// tb_bin2bcd_conv: exhaustive test of the binary-to-two-digit BCD converter.
// Every binary value 0..81 is applied; B and C must be valid digits with
// 10*B + C equal to the input.
module tb_bin2bcd_conv;
  import bcd_pkg::*;

  logic [6:0] p;
  bcd_t       b, c;
  int         checks = 0, failures = 0;

  bin2bcd_conv dut (.p(p), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v <= 81; v++) begin
      p = 7'(v);
      #1;
      checks++;
      if (b > 4'd8 || c > 4'd9 || int'(b) * 10 + int'(c) != v) begin
        failures++;
        $display("FAIL p=%0d -> b=%0d c=%0d", v, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
