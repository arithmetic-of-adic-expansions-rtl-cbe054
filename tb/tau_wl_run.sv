// tau_wl_run: one configuration of the b x K workload, used by
// tb_tau_workloads.  It holds a tau_arith_top built with the given curve
// (M, MU), word width W, unroll factor OMEGA and RAM type, and computes the
// ECDSA blinding product b x K once with the Montgomery ladder (Alg. 8) and
// once with double-and-add (Alg. 7).
//
// b is a random M-bit integer with its leading bit set; K is a random
// signed-digit expansion of M+2 digits.  Each product is checked by value in
// Z[tau] modulo tau^M - 1 and its cycle count against the latency formula of
// the design (shared tasks in tau_top_tasks.svh).  The measured cycle counts
// are returned for the report.
//
// Interface: clk in; checks/failures running counts; cyc8/cyc7 the cycle
// counts of the two products; fin goes high when both are done.
module tau_wl_run #(
  parameter int M         = 283,
  parameter int W         = 16,
  parameter int OMEGA     = 4,
  parameter int MU        = -1,
  parameter bit DUAL_PORT = 1'b0
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   cyc8,
  output int   cyc7,
  output bit   fin
);
  import tau_pkg::*;
  import tau_tb_pkg::*;

  logic rst_n = 1'b0;

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
      $display("FAIL (M=%0d W=%0d omega=%0d %s): %s", M, W, OMEGA,
               DUAL_PORT ? "dual" : "single", what);
    end
  endfunction

  `include "tau_top_tasks.svh"

  initial begin
    int kd[], nf;
    big_t bv;
    checks = 0; failures = 0; cyc8 = 0; cyc7 = 0; fin = 1'b0;
    host_we = 0; host_addr = '0; host_wdata = '0; start = 0; op = OP_ADD6;
    src_a = REG_K; src_b = REG_K; dst = REG_C; a_zero = 0; b_signed = 0; b_msb = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int lad = 1; lad >= 0; lad--) begin
      kd = new[M + 2];
      foreach (kd[i]) kd[i] = int'($urandom_range(2)) - 1;
      bv = '0;
      for (int i = 0; i < M - 1; i++) bv[i] = 1'($urandom);
      bv[M-1] = 1'b1;
      run_mul(lad[0], bv, kd, nf);
      if (lad) cyc8 = mul_cycles; else cyc7 = mul_cycles;
      $display("M=%0d W=%0d omega=%0d %s: Alg. %0d product in %0d cycles, %0d final folding(s)",
               M, W, OMEGA, DUAL_PORT ? "dual" : "single", lad ? 8 : 7, mul_cycles, nf);
    end
    fin = 1'b1;
  end
endmodule
