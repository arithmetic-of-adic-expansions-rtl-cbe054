// tb_tau_arith_top_full: the unit at its default size (NIST K-283: M = 283,
// MU = -1, W = 16, OMEGA = 4, single-port RAM) computing the ECDSA blinding
// product s_d = b x K.
//
// b is a random 283-bit integer with its leading bit fixed (as done for a
// constant run time) and K a random signed-digit expansion of M+2 digits.
// The product is computed once with the Montgomery ladder (Alg. 8) and once
// with double-and-add (Alg. 7); an Alg. 6 and an Alg. 1 addition are run
// too.  Results are checked by value in Z[tau] modulo tau^M - 1, and the cycle
// counts against the latency formulas (one Alg. 6 addition: 130 cycles).
module tb_tau_arith_top_full;
  import tau_pkg::*;
  import tau_tb_pkg::*;

  localparam int M = 283, W = 16, OMEGA = 4, MU = -1;
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

  tau_arith_top dut (.*);

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  `include "tau_top_tasks.svh"

  initial begin
    int kd[], A[], B[], C[], nf, cyc, g0, g1;
    big_t bv;
    host_we = 0; host_addr = '0; host_wdata = '0; start = 0; op = OP_ADD6;
    src_a = REG_K; src_b = REG_K; dst = REG_C; a_zero = 0; b_signed = 0; b_msb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(L6 == 130, "Alg. 6 latency formula at K-283, W=16, OMEGA=4, single port");

    // one Alg. 6 and one Alg. 1 addition of random binary expansions
    A = new[M]; B = new[M];
    foreach (A[i]) begin A[i] = int'($urandom_range(1)); B[i] = int'($urandom_range(1)); end
    put_exp(BASE_B, A, 0, 0, 1'b0);
    put_exp(BASE_C, B, 0, 0, 1'b0);
    command(OP_ADD6, REG_B, REG_C, REG_D, 1'b0, 1'b0, 0, cyc);
    check(cyc == L6, "Alg. 6 addition latency");
    get_exp(BASE_D, M, C, g0, g1);
    check(zt_eq(zt_add(zt_eval(C, MU), zt_shift_m(zt_make(g0, g1))),
                zt_add(zt_eval(A, MU), zt_eval(B, MU))), "Alg. 6 sum");
    command(OP_ADD1, REG_B, REG_C, REG_D, 1'b0, 1'b0, 0, cyc);
    check(cyc == L1, "Alg. 1 addition latency");
    get_exp(BASE_D, NW1 * W, C, g0, g1);
    check(zt_eq(zt_eval(C, MU), zt_add(zt_eval(A, MU), zt_eval(B, MU))), "Alg. 1 sum");

    // s_d = b x K, both schedules
    for (int lad = 1; lad >= 0; lad--) begin
      kd = new[M + 2];
      foreach (kd[i]) kd[i] = int'($urandom_range(2)) - 1;
      bv = '0;
      for (int i = 0; i < M - 1; i++) bv[i] = 1'($urandom);
      bv[M-1] = 1'b1;
      run_mul(lad[0], bv, kd, nf);
      $display("%s: b x K done, %0d final folding(s)", lad ? "Alg. 8" : "Alg. 7", nf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
