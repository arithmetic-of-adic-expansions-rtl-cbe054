// tb_tau_add_dp: self-checking test of the Alg. 1 datapath extension.
//
// Two instances: OMEGA = 1 with MU = -1 and OMEGA = 2 with MU = +1.  Random
// binary A and signed-digit B (including the all-2 and all--1 digit sums) are
// fed digit-serially until the inputs are exhausted and the carry is zero.
// Checks: the result digits evaluate to A + B exactly in Z[tau], the result is
// at most n + 7 digits long, and the carry stays inside the 21-state set.
module tb_tau_add_dp;
  import tau_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // instance 0: OMEGA = 1, MU = -1
  logic       clr0, en0;
  logic [0:0] a0, bl0, bh0, c0;
  logic signed [2:0] t00, t10;
  logic       z0;
  tau_add_dp #(.OMEGA(1), .MU(-1)) dut0 (
    .clk, .rst_n, .clr(clr0), .en(en0), .a(a0), .b_lo(bl0), .b_hi(bh0),
    .c(c0), .t0(t00), .t1(t10), .carry_zero(z0));

  // instance 1: OMEGA = 2, MU = +1
  logic       clr1, en1;
  logic [1:0] a1, bl1, bh1, c1;
  logic signed [2:0] t01, t11;
  logic       z1;
  tau_add_dp #(.OMEGA(2), .MU(1)) dut1 (
    .clk, .rst_n, .clr(clr1), .en(en1), .a(a1), .b_lo(bl1), .b_hi(bh1),
    .c(c1), .t0(t01), .t1(t11), .carry_zero(z1));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  task automatic run_add(input int inst, input int n, input int kind);
    int A[], B[], C[], cl[$];
    int om, mu, i, len, t0v, t1v;
    zt_t lhs, rhs;
    om = (inst == 0) ? 1 : 2;
    mu = (inst == 0) ? -1 : 1;
    A = new[n];
    B = new[n];
    for (int j = 0; j < n; j++) begin
      A[j] = (kind == 1) ? 1 : int'($urandom_range(1));
      B[j] = (kind == 1) ? 1 : (kind == 2) ? -1 : int'($urandom_range(2)) - 1;
      if (kind == 2) A[j] = 0;
    end
    @(negedge clk);
    clr0 = (inst == 0); clr1 = (inst == 1);
    @(negedge clk);
    clr0 = 1'b0; clr1 = 1'b0;
    i = 0;
    while (i < n || !((inst == 0) ? z0 : z1)) begin
      for (int g = 0; g < om; g++) begin
        logic av, bl, bh;
        av = (i + g < n) ? A[i+g][0] : 1'b0;
        bl = (i + g < n) ? (B[i+g] != 0) : 1'b0;
        bh = (i + g < n) ? (B[i+g] < 0) : 1'b0;
        if (inst == 0) begin a0[g] = av; bl0[g] = bl; bh0[g] = bh; end
        else           begin a1[g] = av; bl1[g] = bl; bh1[g] = bh; end
      end
      en0 = (inst == 0); en1 = (inst == 1);
      #1;
      for (int g = 0; g < om; g++) cl.push_back((inst == 0) ? int'(c0[g]) : int'(c1[g]));
      @(negedge clk);
      en0 = 1'b0; en1 = 1'b0;
      t0v = (inst == 0) ? int'(t00) : int'(t01);
      t1v = (inst == 0) ? int'(t10) : int'(t11);
      if (!in_s0(t0v, t1v, mu)) begin
        check(1'b0, $sformatf("carry (%0d,%0d) left the state set", t0v, t1v));
      end
      i += om;
      if (i > n + 40) break;
    end
    len = cl.size();
    while (len > 0 && cl[len-1] == 0) len--;
    C = new[cl.size()];
    foreach (cl[j]) C[j] = cl[j];
    lhs = zt_eval(C, mu);
    rhs = zt_add(zt_eval(A, mu), zt_eval(B, mu));
    check(zt_eq(lhs, rhs), $sformatf("inst %0d n=%0d: C != A + B", inst, n));
    check(len <= n + 7, $sformatf("inst %0d: result length %0d > n+7", inst, len));
  endtask

  initial begin
    clr0 = 0; en0 = 0; a0 = '0; bl0 = '0; bh0 = '0;
    clr1 = 0; en1 = 0; a1 = '0; bl1 = '0; bh1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int inst = 0; inst < 2; inst++) begin
      run_add(inst, 16, 1);   // all digit sums = 2
      run_add(inst, 16, 2);   // all digit sums = -1
      for (int t = 0; t < 60; t++) run_add(inst, 8 + int'($urandom_range(60)), 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
