// tb_bcd_mul_top: end-to-end test of the multiplier top at its default size
// (16-digit operands, 32-digit products). Each operation drives one operand
// pair to all four multipliers and checks every product digit against a
// schoolbook reference, plus the latency of the pipelined iterative units (17
// edges for the sequential units, 9 for the semi-parallel one; the fully parallel product is checked as soon as
// the operands settle). Some operations use 3-digit operands, the size of the
// paper-and-pencil example. It counts how often each mechanism occurred
// and fails if one never did: completed operations per unit, a start ignored
// while busy, an all-nines operation (largest carries), a 3-digit operation,
// an operation after which the high and low product halves are both nonzero,
// and clock cycles in which a unit's cell array and adder work at the same
// time on different multiplier digits (pipeline overlap).
module tb_bcd_mul_top;
  import bcd_pkg::*;
  import tb_bcd_util_pkg::*;

  localparam int N = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  bcd_t [N-1:0] x, y;
  logic busy_sd, done_sd, busy_sa, done_sa, busy_sp, done_sp;
  bcd_t [2*N-1:0] prod_sd, prod_sa, prod_sp, prod_par;
  int checks = 0, failures = 0;
  int n_done [4];
  int n_ignored = 0, n_nines = 0, n_both_halves = 0, n_small = 0, n_overlap = 0;

  always #5 clk = ~clk;

  // pipeline overlap: a registered partial product is being accumulated while
  // the cells already produce the next one
  always @(posedge clk)
    if (dut.u_seq_area.pp_vld_q && dut.u_seq_area.issue_q != '0 &&
        dut.u_semi.pp_vld_q && dut.u_semi.issue_q != '0)
      n_overlap++;

  bcd_mul_top dut (
    .clk, .rst_n, .start, .x, .y,
    .busy_seq_delay(busy_sd), .done_seq_delay(done_sd), .product_seq_delay(prod_sd),
    .busy_seq_area(busy_sa),  .done_seq_area(done_sa),  .product_seq_area(prod_sa),
    .busy_semi(busy_sp),      .done_semi(done_sp),      .product_semi(prod_sp),
    .product_par(prod_par)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_prod(input string tag, input bcd_t [2*N-1:0] p, input dnum_t r);
    bit ok = 1'b1;
    for (int j = 0; j < 2 * N; j++) if (int'(p[j]) != int'(r[j])) ok = 1'b0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s product mismatch", tag);
    end
  endtask

  task automatic run(input dnum_t a, input dnum_t b, input bit poke_busy);
    dnum_t r;
    int cyc;
    int got [3];
    bit lo_nz, hi_nz;
    got = '{-1, -1, -1};
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      x[i] = 4'(a[i]);
      y[i] = 4'(b[i]);
    end
    start = 1'b1;
    mul_ref(a, b, N, r);
    #1;
    check_prod("par", prod_par, r);
    n_done[3]++;
    @(posedge clk);
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (got[0] < 0 || got[1] < 0 || got[2] < 0) begin
      if (poke_busy && cyc == 2) begin
        y = '0;
        start = 1'b1;
        if (busy_sd && busy_sa && busy_sp) n_ignored++;
      end else begin
        start = 1'b0;
      end
      @(posedge clk);
      cyc++;
      #1;
      if (done_sd && got[0] < 0) got[0] = cyc;
      if (done_sa && got[1] < 0) got[1] = cyc;
      if (done_sp && got[2] < 0) got[2] = cyc;
      if (cyc > 3 * N) break;
    end
    start = 1'b0;
    check_prod("seq_delay", prod_sd, r);
    check_prod("seq_area", prod_sa, r);
    check_prod("semi", prod_sp, r);
    checks += 3;
    if (got[0] != N + 1 || got[1] != N + 1 || got[2] != N / 2 + 1) begin
      failures++;
      $display("FAIL latency %0d %0d %0d", got[0], got[1], got[2]);
    end
    if (got[0] == N + 1) n_done[0]++;
    if (got[1] == N + 1) n_done[1]++;
    if (got[2] == N / 2 + 1) n_done[2]++;
    lo_nz = 1'b0;
    hi_nz = 1'b0;
    for (int j = 0; j < N; j++) begin
      if (r[j] != 0) lo_nz = 1'b1;
      if (r[j + N] != 0) hi_nz = 1'b1;
    end
    if (lo_nz && hi_nz) n_both_halves++;
  endtask

  initial begin
    dnum_t a, b;
    rst_n = 1'b0;
    start = 1'b0;
    x = '0;
    y = '0;
    n_done = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      clear(a);
      clear(b);
      for (int i = 0; i < N; i++) begin
        a[i] = (t == 0) ? 9 : rand_digit();
        b[i] = (t == 0) ? 9 : rand_digit();
        if (t >= 2 && t < 6 && i >= 3) begin
          a[i] = 0;
          b[i] = 0;
        end
      end
      if (t == 0) n_nines++;
      if (t >= 2 && t < 6) n_small++;
      run(a, b, t == 1);
    end
    checks++;
    if (n_done[0] == 0 || n_done[1] == 0 || n_done[2] == 0 || n_done[3] == 0 ||
        n_ignored == 0 || n_nines == 0 || n_both_halves == 0 || n_small == 0 ||
        n_overlap == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("operations: seq_delay=%0d seq_area=%0d semi=%0d par=%0d; starts ignored while busy=%0d; all-nines=%0d; 3-digit=%0d; two-half products=%0d; overlap cycles=%0d",
             n_done[0], n_done[1], n_done[2], n_done[3], n_ignored, n_nines, n_small, n_both_halves, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
