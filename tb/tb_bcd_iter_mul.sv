// tb_bcd_iter_mul: test of the iterative BCD multiplier at N = 8 digits in four
// configurations covering one and two digits per iteration, both cell variants
// and both the pipelined and the single-stage form. Random and corner operands
// are multiplied; the product must match an integer reference and done must
// come exactly N/K (+1 when pipelined) clock edges after the edge that accepted
// start. A start while busy must be ignored.
module tb_bcd_iter_mul;
  import bcd_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  bcd_t [N-1:0] x, y;
  localparam int NU = 4;
  localparam int LAT [NU] = '{N + 1, N, N / 2 + 1, N / 2};
  logic [NU-1:0] busy, done;
  bcd_t [NU-1:0][2*N-1:0] prod;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bcd_iter_mul #(.N(N), .K(1), .CELL(CELL_DELAY), .PIPE(1'b1)) dut0 (
    .clk, .rst_n, .start, .x, .y, .busy(busy[0]), .done(done[0]), .product(prod[0]));
  bcd_iter_mul #(.N(N), .K(1), .CELL(CELL_AREA), .PIPE(1'b0)) dut1 (
    .clk, .rst_n, .start, .x, .y, .busy(busy[1]), .done(done[1]), .product(prod[1]));
  bcd_iter_mul #(.N(N), .K(2), .CELL(CELL_AREA), .PIPE(1'b1)) dut2 (
    .clk, .rst_n, .start, .x, .y, .busy(busy[2]), .done(done[2]), .product(prod[2]));
  bcd_iter_mul #(.N(N), .K(2), .CELL(CELL_DELAY), .PIPE(1'b0)) dut3 (
    .clk, .rst_n, .start, .x, .y, .busy(busy[3]), .done(done[3]), .product(prod[3]));

  function automatic longint unsigned val(input bcd_t [2*N-1:0] d);
    longint unsigned v = 0;
    for (int j = 2 * N - 1; j >= 0; j--) v = v * 10 + longint'(d[j]);
    return v;
  endfunction

  function automatic longint unsigned valn(input bcd_t [N-1:0] d);
    longint unsigned v = 0;
    for (int j = N - 1; j >= 0; j--) v = v * 10 + longint'(d[j]);
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bcd_t [N-1:0] a, input bcd_t [N-1:0] b, input bit poke_busy);
    int cyc;
    int got [NU];
    bit waiting;
    longint unsigned exp;
    got = '{-1, -1, -1, -1};
    @(negedge clk);
    x = a;
    y = b;
    start = 1'b1;
    @(posedge clk);              // start accepted on this edge
    @(negedge clk);
    start = 1'b0;
    exp = valn(a) * valn(b);
    cyc = 0;
    waiting = 1'b1;
    while (waiting) begin
      if (poke_busy && cyc == 1) begin
        x = '0;                  // a start while busy must change nothing
        start = 1'b1;
      end else begin
        start = 1'b0;
      end
      @(posedge clk);
      cyc++;
      #1;
      waiting = 1'b0;
      for (int u = 0; u < NU; u++) begin
        if (done[u] && got[u] < 0) got[u] = cyc;
        if (got[u] < 0) waiting = 1'b1;
      end
      if (cyc > 3 * N) break;
    end
    start = 1'b0;
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (val(prod[u]) != exp) begin
        failures++;
        $display("FAIL unit %0d: %0d * %0d = %0d, got %0d", u, valn(a), valn(b), exp, val(prod[u]));
      end
      checks++;
      if (got[u] != LAT[u]) begin
        failures++;
        $display("FAIL unit %0d: done after %0d edges", u, got[u]);
      end
      checks++;
      if (busy[u]) begin
        failures++;
        $display("FAIL unit %0d still busy", u);
      end
    end
  endtask

  initial begin
    bcd_t [N-1:0] a, b;
    rst_n = 1'b0;
    start = 1'b0;
    x = '0;
    y = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < N; i++) begin
        case (t)
          0: begin a[i] = 4'd9; b[i] = 4'd9; end
          1: begin a[i] = 4'd0; b[i] = 4'(i % 10); end
          2: begin a[i] = 4'(i == 0); b[i] = 4'd7; end
          default: begin a[i] = 4'($urandom_range(9, 0)); b[i] = 4'($urandom_range(9, 0)); end
        endcase
      end
      run(a, b, t == 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
