// tb_ptau_add_dp: self-checking test of the Alg. 6 datapath extension.
//
// Five instances with different M mod OMEGA, so that the last-step
// multiplexer picks stage 1, 2, 3 and 11:  (M=13, OMEGA=4, MU=-1),
// (M=11, OMEGA=3, MU=+1), the defaults (M=283, OMEGA=4, MU=-1),
// (M=283, OMEGA=16, MU=-1) and (M=163, OMEGA=8, MU=+1); the last two also
// use the narrowed 3-bit stages from the eighth stage on.  Each run
// loads alpha + beta (both random members of the 21-carry set), feeds exactly
// M digit pairs and reads the final carry gamma.  Checks: the identity
// C + tau^M*gamma = A + B + alpha + beta holds exactly, gamma is again in the
// 21-carry set (the bounded-remainder property for M > 6), and the number of
// enabled steps is ceil(M/OMEGA).
module tb_ptau_add_dp;
  import tau_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              load, last;
  logic signed [3:0] ti0, ti1;
  logic [4:0]        en;
  logic [15:0]       a, bl, bh;
  logic [3:0]        c0, c2;
  logic [2:0]        c1;
  logic [15:0]       c3;
  logic [7:0]        c4;
  logic signed [3:0] g0 [5], g1 [5];

  ptau_add_dp #(.M(13), .OMEGA(4), .MU(-1)) dut0 (
    .clk, .rst_n, .load, .t0_in(ti0), .t1_in(ti1), .en(en[0]), .last,
    .a(a[3:0]), .b_lo(bl[3:0]), .b_hi(bh[3:0]), .c(c0), .t0(g0[0]), .t1(g1[0]));
  ptau_add_dp #(.M(11), .OMEGA(3), .MU(1)) dut1 (
    .clk, .rst_n, .load, .t0_in(ti0), .t1_in(ti1), .en(en[1]), .last,
    .a(a[2:0]), .b_lo(bl[2:0]), .b_hi(bh[2:0]), .c(c1), .t0(g0[1]), .t1(g1[1]));
  ptau_add_dp dut2 (
    .clk, .rst_n, .load, .t0_in(ti0), .t1_in(ti1), .en(en[2]), .last,
    .a(a[3:0]), .b_lo(bl[3:0]), .b_hi(bh[3:0]), .c(c2), .t0(g0[2]), .t1(g1[2]));
  ptau_add_dp #(.M(283), .OMEGA(16), .MU(-1)) dut3 (
    .clk, .rst_n, .load, .t0_in(ti0), .t1_in(ti1), .en(en[3]), .last,
    .a(a), .b_lo(bl), .b_hi(bh), .c(c3), .t0(g0[3]), .t1(g1[3]));
  ptau_add_dp #(.M(163), .OMEGA(8), .MU(1)) dut4 (
    .clk, .rst_n, .load, .t0_in(ti0), .t1_in(ti1), .en(en[4]), .last,
    .a(a[7:0]), .b_lo(bl[7:0]), .b_hi(bh[7:0]), .c(c4), .t0(g0[4]), .t1(g1[4]));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  task automatic run_add(input int inst, input int kind);
    int A[], B[], C[];
    int m, om, mu, steps, al0, al1, be0, be1;
    zt_t lhs, rhs;
    m  = (inst == 0) ? 13 : (inst == 1) ? 11 : (inst == 4) ? 163 : 283;
    om = (inst == 1) ? 3 : (inst == 3) ? 16 : (inst == 4) ? 8 : 4;
    mu = (inst == 1 || inst == 4) ? 1 : -1;
    A = new[m]; B = new[m]; C = new[m];
    foreach (A[j]) begin
      A[j] = (kind == 1) ? 1 : int'($urandom_range(1));
      B[j] = (kind == 1) ? 1 : int'($urandom_range(2)) - 1;
    end
    rand_s0(al0, al1, mu);
    rand_s0(be0, be1, mu);
    if (kind == 2) begin al0 = -3; al1 = 2; be0 = -3; be1 = 1; end
    if (!in_s0(al0, al1, mu) || !in_s0(be0, be1, mu)) begin
      al0 = 0; al1 = 0; be0 = 0; be1 = 0;
    end
    @(negedge clk);
    load = 1'b1; ti0 = 4'(al0 + be0); ti1 = 4'(al1 + be1);
    @(negedge clk);
    load = 1'b0;
    steps = 0;
    for (int i = 0; i < m; i += om) begin
      for (int g = 0; g < 16; g++) begin
        a[g]  = (g < om && i + g < m) ? A[i+g][0] : 1'b0;
        bl[g] = (g < om && i + g < m) ? (B[i+g] != 0) : 1'b0;
        bh[g] = (g < om && i + g < m) ? (B[i+g] < 0) : 1'b0;
      end
      last = (i + om >= m);
      en = 5'(1 << inst);
      #1;
      for (int g = 0; g < om; g++) begin
        if (i + g < m) C[i+g] = (inst == 0) ? int'(c0[g]) : (inst == 1) ? int'(c1[g]) :
                                (inst == 2) ? int'(c2[g]) : (inst == 3) ? int'(c3[g]) : int'(c4[g]);
      end
      steps++;
      @(negedge clk);
      en = '0; last = 1'b0;
    end
    lhs = zt_add(zt_eval(C, mu), zt_mul_tau_pow(zt_make(int'(g0[inst]), int'(g1[inst])), m, mu));
    rhs = zt_add(zt_add(zt_eval(A, mu), zt_eval(B, mu)), zt_make(al0 + be0, al1 + be1));
    check(zt_eq(lhs, rhs), $sformatf("inst %0d: C + tau^m g != A + B + alpha + beta", inst));
    check(in_s0(int'(g0[inst]), int'(g1[inst]), mu),
          $sformatf("inst %0d: gamma (%0d,%0d) outside the state set", inst, g0[inst], g1[inst]));
    check(steps == (m + om - 1) / om, "step count");
  endtask

  function automatic zt_t zt_mul_tau_pow(input zt_t v, input int e, input int mu);
    zt_t r;
    r = v;
    for (int i = 0; i < e; i++) r = zt_mul_tau(r, mu);
    return r;
  endfunction

  initial begin
    load = 0; last = 0; en = '0; ti0 = '0; ti1 = '0; a = '0; bl = '0; bh = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int inst = 0; inst < 5; inst++) begin
      run_add(inst, 1);
      run_add(inst, 2);
      for (int t = 0; t < 80; t++) run_add(inst, 0);
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
