// tau_top_tasks.svh: host-side tasks shared by the end-to-end testbenches of
// tau_arith_top.  The including module defines M, W, OMEGA, MU, DUAL_PORT,
// the DUT port signals, 'checks'/'failures' and the 'check' function.
// The RAM map is recomputed here from the formula documented in
// tau_arith_top.

localparam int NW     = (M + W - 1) / W;
localparam int NW1    = (M + 7 + W - 1) / W;
localparam int H      = DUAL_PORT ? 2 : 3;
localparam int BASE_K = 0;
localparam int BASE_B = 2 * NW1 + 1;
localparam int BASE_C = BASE_B + NW1 + 1;
localparam int BASE_D = BASE_C + NW1 + 1;
localparam int BASE_I = BASE_D + NW1 + 1;
localparam int L6     = NW * (W / OMEGA + H) + H + 1;   // one Alg. 6 addition
localparam int L1     = NW1 * (W / OMEGA + H);          // one Alg. 1 addition

function automatic int region_addr(input region_e r);
  case (r)
    REG_K:   return BASE_K;
    REG_B:   return BASE_B;
    REG_C:   return BASE_C;
    default: return BASE_D;
  endcase
endfunction

task automatic host_write(input int addr, input logic [W-1:0] v);
  @(negedge clk);
  host_we = 1'b1; host_addr = addr_t'(addr); host_wdata = v;
  @(negedge clk);
  host_we = 1'b0;
endtask

task automatic host_read(input int addr, output logic [W-1:0] v);
  @(negedge clk);
  host_addr = addr_t'(addr);
  #1 v = host_rdata;
endtask

// write digits d[] (d.size() <= NW1*W) and remainder (r0, r1) to region base
task automatic put_exp(input int base, input int d[], input int r0, input int r1, input bit sgn);
  logic [W-1:0] v, s;
  for (int j = 0; j < NW1; j++) begin
    v = '0; s = '0;
    for (int b = 0; b < W; b++) begin
      if (j * W + b < d.size()) begin
        v[b] = (d[j*W+b] != 0);
        s[b] = (d[j*W+b] < 0);
      end
    end
    host_write(base + j, v);
    if (sgn) host_write(base + NW1 + 1 + j, s);
  end
  v = '0;
  v[W/2-1:0] = (W/2)'(r0);
  v[W-1:W/2] = (W/2)'(r1);
  host_write(base + NW1, v);
endtask

task automatic get_exp(input int base, input int n, output int d[], output int r0, output int r1);
  logic [W-1:0] v;
  d = new[n];
  for (int j = 0; j * W < n; j++) begin
    host_read(base + j, v);
    for (int b = 0; b < W; b++) if (j * W + b < n) d[j*W+b] = int'(v[b]);
  end
  host_read(base + NW1, v);
  r0 = int'(signed'(v[W/2-1:0]));
  r1 = int'(signed'(v[W-1:W/2]));
endtask

// issue a command and count cycles until done
task automatic command(input op_e o, input region_e sa, input region_e sb, input region_e sd,
                       input logic az, input logic bs, input int msb, output int cyc);
  @(negedge clk);
  start = 1'b1; op = o; src_a = sa; src_b = sb; dst = sd; a_zero = az; b_signed = bs;
  b_msb = AW'(msb);
  @(negedge clk);
  start = 1'b0;
  cyc = 1;
  while (!done && cyc < 2000000) begin
    @(negedge clk);
    cyc++;
  end
  @(negedge clk);
endtask

function automatic zt_t zt_shift_m(input zt_t v);
  zt_t r;
  r = v;
  for (int i = 0; i < M; i++) r = zt_mul_tau(r, MU);
  return r;
endfunction

int mul_cycles;  // cycle count of the last run_mul, start to done

// b x K with Alg. 7 (lad = 0) or Alg. 8 (lad = 1); K has M+2 signed digits.
// Returns the number of final foldings.
task automatic run_mul(input logic lad, input big_t bval, input int kd[], output int nfold);
  int Kp[], C[], g0, g1, msb, wt, cyc, exp_cyc, nops;
  logic [W-1:0] v;
  zt_t lhs, rhs;
  Kp = new[M];
  foreach (Kp[i]) Kp[i] = kd[i];
  put_exp(BASE_K, Kp, kd[M], kd[M+1], 1'b1);
  msb = 0; wt = 0;
  for (int i = 0; i < NW * W; i++) if (bval[i]) begin msb = i; wt++; end
  for (int j = 0; j < NW; j++) begin
    v = bval[j*W +: W];
    host_write(BASE_I + j, v);
  end
  command(lad ? OP_MUL8 : OP_MUL7, REG_K, REG_K, REG_C, 1'b0, 1'b0, msb, cyc);
  nfold = int'(embed_count);
  mul_cycles = cyc;
  get_exp(BASE_C, M, C, g0, g1);
  lhs = zt_add(zt_eval(C, MU), zt_make(g0, g1));
  rhs = zt_scale(zt_eval(kd, MU), bval);
  check(zt_cong(lhs, rhs, M, MU), $sformatf("%s: C + gamma != b*K mod tau^m - 1",
                                             lad ? "Alg. 8" : "Alg. 7"));
  check(embed_fail || (g0 == 0 && g1 == 0), "remainder folded into C");
  nops = lad ? 2 * msb + 3 : msb + wt + 1;
  nops = nops + nfold - 1;
  // every addition costs L6 plus one issue cycle, the first reads K's sign
  // plane (NW more cycles); one cycle per bit of b and one to finish
  exp_cyc = nops * (L6 + 1) + NW + msb + 1;
  check(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", lad ? "Alg. 8" : "Alg. 7",
                                  cyc, exp_cyc));
endtask
