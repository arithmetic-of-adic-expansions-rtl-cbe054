// tb_tau_arith_top: end-to-end test of the tau-adic arithmetic unit at reduced
// size (M = 13, W = 8, OMEGA = 4, MU = -1, single-port RAM), driven only
// through the host port.
//
// Runs host additions with Alg. 1 and Alg. 6 (including a signed operand and
// a zero operand) between randomly chosen RAM regions, and many products b x K with both schedules, for random
// signed-digit K of M+2 digits and random b.  Results are checked by value in
// Z[tau]; every command's cycle count is checked against the latency
// formulas.  The small M makes the rare case of a non-zero remainder after
// the final folding frequent, so the repeated folding is exercised.  Each
// mechanism is counted and one that never occurred counts as a failure.
module tb_tau_arith_top;
  import tau_pkg::*;
  import tau_tb_pkg::*;

  localparam int M = 13, W = 8, OMEGA = 4, MU = -1;
  localparam bit DUAL_PORT = 1'b0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic         host_we, host_ready, start, a_zero, b_signed, busy, done, carry_nz, embed_fail;
  addr_t        host_addr;
  logic [W-1:0] host_wdata, host_rdata;
  op_e          op;
  region_e      src_a, src_b, dst;
  logic [AW-1:0] b_msb;
  logic signed [3:0] gamma_t0, gamma_t1;
  logic [2:0]   embed_count;

  tau_arith_top #(.M(M), .W(W), .OMEGA(OMEGA), .MU(MU), .DUAL_PORT(DUAL_PORT)) dut (.*);

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  `include "tau_top_tasks.svh"

  int n_add1 = 0, n_add6 = 0, n_signed = 0, n_zero = 0, n_mul7 = 0, n_mul7_add = 0;
  int n_lad0 = 0, n_lad1 = 0, n_refold = 0, n_busy_block = 0;
  int n_dst [4] = '{0, 0, 0, 0};  // additions written to each region

  task automatic test_add(input logic alg1, input logic sgn, input logic az);
    int A[], B[], C[], a0, a1, b0, b1, g0, g1, cyc, n, exp_cyc;
    region_e ra, rb, rd;
    zt_t lhs, rhs;
    n = M;
    A = new[n]; B = new[n];
    foreach (A[i]) begin
      A[i] = az ? 0 : int'($urandom_range(1));
      B[i] = sgn ? int'($urandom_range(2)) - 1 : int'($urandom_range(1));
    end
    if (alg1 || az) begin a0 = 0; a1 = 0; end else rand_s0(a0, a1, MU);
    if (alg1) begin b0 = 0; b1 = 0; end else rand_s0(b0, b1, MU);
    // random regions: a signed operand must sit in K (the only region with a
    // sign plane); the destination may be any region, a source included
    do begin
      ra = region_e'($urandom_range(3));
      rb = sgn ? REG_K : region_e'($urandom_range(3));
    end while (ra == rb);
    rd = region_e'($urandom_range(3));
    n_dst[rd]++;
    put_exp(region_addr(ra), A, a0, a1, 1'b0);
    put_exp(region_addr(rb), B, b0, b1, sgn);
    command(alg1 ? OP_ADD1 : OP_ADD6, ra, rb, rd, az, sgn, 0, cyc);
    exp_cyc = (alg1 ? L1 : L6) + (sgn ? (alg1 ? NW1 : NW) : 0);
    check(cyc == exp_cyc, $sformatf("addition latency %0d, expected %0d", cyc, exp_cyc));
    if (alg1) begin
      get_exp(region_addr(rd), NW1 * W, C, g0, g1);
      check(zt_eq(zt_eval(C, MU), zt_add(zt_eval(A, MU), zt_eval(B, MU))), "Alg. 1 sum");
      check(!carry_nz, "Alg. 1 carry died out");
      n_add1++;
    end else begin
      get_exp(region_addr(rd), M, C, g0, g1);
      lhs = zt_add(zt_eval(C, MU), zt_shift_m(zt_make(g0, g1)));
      rhs = zt_add(zt_add(zt_eval(A, MU), zt_eval(B, MU)), zt_make(a0 + b0, a1 + b1));
      check(zt_eq(lhs, rhs), "Alg. 6 sum");
      check(g0 == int'(gamma_t0) && g1 == int'(gamma_t1), "gamma status matches RAM");
      n_add6++;
    end
    if (sgn) n_signed++;
    if (az) n_zero++;
  endtask

  initial begin
    int kd[], nf, msb;
    big_t bv;
    logic [W-1:0] v;
    host_we = 0; host_addr = '0; host_wdata = '0; start = 0; op = OP_ADD6;
    src_a = REG_K; src_b = REG_K; dst = REG_C; a_zero = 0; b_signed = 0; b_msb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 16; t++) test_add(1'b1, 1'(t % 2), 1'b0);
    for (int t = 0; t < 16; t++) test_add(1'b0, 1'(t % 2), 1'b0);
    for (int t = 0; t < 3; t++) test_add(1'b0, 1'b1, 1'b1);

    // host writes are ignored while the unit is busy
    host_write(BASE_D, 8'h5a);
    @(negedge clk);
    start = 1'b1; op = OP_ADD6; src_a = REG_B; src_b = REG_B; dst = REG_C; a_zero = 0; b_signed = 0;
    @(negedge clk);
    start = 1'b0;
    check(!host_ready, "host locked out while busy");
    host_we = 1'b1; host_addr = addr_t'(BASE_D); host_wdata = 8'ha5;
    @(negedge clk);
    host_we = 1'b0;
    while (busy) @(negedge clk);
    host_read(BASE_D, v);
    check(v == 8'h5a, "host write dropped while busy");
    n_busy_block++;

    for (int t = 0; t < 160; t++) begin
      kd = new[M + 2];
      foreach (kd[i]) kd[i] = int'($urandom_range(2)) - 1;
      bv = '0;
      msb = (t < 4) ? t : int'($urandom_range(NW * W - 1));
      bv[msb] = 1'b1;
      for (int i = 0; i < msb; i++) bv[i] = 1'($urandom);
      run_mul(t[0], bv, kd, nf);
      if (nf > 1) n_refold++;
      if (!t[0]) begin
        n_mul7++;
        for (int i = 0; i < msb; i++) if (bv[i]) n_mul7_add++;
      end else begin
        for (int i = 0; i < msb; i++) if (bv[i]) n_lad1++; else n_lad0++;
      end
    end

    $display("mechanisms: alg1=%0d alg6=%0d signed=%0d zero=%0d mul7=%0d mul7_add=%0d ladder0=%0d ladder1=%0d refold=%0d busy_block=%0d",
             n_add1, n_add6, n_signed, n_zero, n_mul7, n_mul7_add, n_lad0, n_lad1, n_refold, n_busy_block);
    check(n_add1 > 0 && n_add6 > 0 && n_signed > 0 && n_zero > 0, "all addition modes used");
    check(n_mul7 > 0 && n_mul7_add > 0, "double-and-add with additions");
    check(n_lad0 > 0 && n_lad1 > 0, "both ladder branches");
    check(n_refold > 0, "final folding repeated");
    for (int r = 0; r < 4; r++) check(n_dst[r] > 0, $sformatf("addition into region %0d", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
