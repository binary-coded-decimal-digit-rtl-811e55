// tb_bcd_multi_add: random test of the multi-operand BCD adder with three and
// five operands of 17 digits. The digit sum and the decimal carry out must
// equal the integer sum of the operands; all-nines operands are included to
// force the largest column carries.
module tb_bcd_multi_add;
  import bcd_pkg::*;

  localparam int W = 17;

  bcd_t [2:0][W-1:0] ops3;
  bcd_t [4:0][W-1:0] ops5;
  bcd_t [W-1:0]      sum3, sum5;
  logic [7:0]        cout3, cout5;
  int checks = 0, failures = 0;

  bcd_multi_add #(.M(3), .W(W)) dut3 (.ops(ops3), .sum(sum3), .cout(cout3));
  bcd_multi_add #(.M(5), .W(W)) dut5 (.ops(ops5), .sum(sum5), .cout(cout5));

  function automatic longint unsigned val(input bcd_t [W-1:0] d);
    longint unsigned v = 0;
    for (int j = W - 1; j >= 0; j--) v = v * 10 + longint'(d[j]);
    return v;
  endfunction

  localparam longint unsigned TEN_W = 64'd100000000000000000;  // 10**17

  task automatic check(input string tag, input longint unsigned exp,
                       input bcd_t [W-1:0] s, input logic [7:0] co);
    checks++;
    if (val(s) != exp % TEN_W || longint'(co) != exp / TEN_W) begin
      failures++;
      $display("FAIL %s got %0d carry %0d expected %0d", tag, val(s), co, exp);
    end
    for (int j = 0; j < W; j++) begin
      checks++;
      if (s[j] > 4'd9) begin
        failures++;
        $display("FAIL %s digit %0d not BCD", tag, j);
      end
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
    longint unsigned e3, e5;
    for (int t = 0; t < 500; t++) begin
      for (int m = 0; m < 5; m++)
        for (int j = 0; j < W; j++) begin
          ops5[m][j] = 4'(t == 0 ? 9 : (t == 1 ? 0 : $urandom_range(9, 0)));
          if (m < 3) ops3[m][j] = ops5[m][j];
        end
      #1;
      e3 = 0;
      e5 = 0;
      for (int m = 0; m < 5; m++) begin
        e5 += val(ops5[m]);
        if (m < 3) e3 += val(ops3[m]);
      end
      check("M3", e3, sum3, cout3);
      check("M5", e5, sum5, cout5);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
