// tb_ptau_seq: self-checking test of the word-serial addition sequencer.
//
// Two instances, each with its own behavioural register-file memory:
//   dut0: defaults (K-283: M=283, W=16, OMEGA=4, MU=-1, single-port RAM)
//   dut1: K-163 example (M=163, W=8, OMEGA=4, MU=+1, dual-port RAM)
// Operations: Alg. 6 additions of random partial expansions (binary B, signed
// B, zero A, in place), and Alg. 1 additions.  Checks, by value in Z[tau]:
//   Alg. 6: C + tau^M*gamma = A + alpha + B + beta, gamma in the 21-carry
//           set, no result digit at position >= M;
//   Alg. 1: C = A + B and the final carry is zero.
// Latency is checked against  NW*(W/OMEGA+h)+h+1  (Alg. 6) and
// NW1*(W/OMEGA+h) (Alg. 1), h = 3 single-port, 2 dual-port, plus one cycle
// per word for a signed operand; for dut1 the Alg. 6 figure is 87 cycles.
module tb_ptau_seq;
  import tau_pkg::*;
  import tau_tb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int BA = 0, BB = 64, BD = 128;

  logic [15:0] mem0 [256];
  logic [7:0]  mem1 [256];

  logic     start0, start1, busy0, busy1, done0, done1, gnz0, gnz1, cnz0, cnz1;
  seq_cmd_t cmd;
  logic signed [3:0] g00, g10, g01, g11;
  logic     we0, we1;
  addr_t    a00, a10, a01, a11;
  logic [15:0] wd0;
  logic [7:0]  wd1;

  ptau_seq dut0 (
    .clk, .rst_n, .start(start0), .cmd, .busy(busy0), .done(done0),
    .gamma_t0(g00), .gamma_t1(g10), .gamma_nz(gnz0), .carry_nz(cnz0),
    .mem_we(we0), .mem_addr0(a00), .mem_wdata(wd0), .mem_rdata0(mem0[a00[7:0]]),
    .mem_addr1(a10), .mem_rdata1(16'hdead));
  ptau_seq #(.M(163), .W(8), .OMEGA(4), .MU(1), .DUAL_PORT(1'b1)) dut1 (
    .clk, .rst_n, .start(start1), .cmd, .busy(busy1), .done(done1),
    .gamma_t0(g01), .gamma_t1(g11), .gamma_nz(gnz1), .carry_nz(cnz1),
    .mem_we(we1), .mem_addr0(a01), .mem_wdata(wd1), .mem_rdata0(mem1[a01[7:0]]),
    .mem_addr1(a11), .mem_rdata1(mem1[a11[7:0]]));

  always_ff @(posedge clk) begin
    if (we0) mem0[a00[7:0]] <= wd0;
    if (we1) mem1[a01[7:0]] <= wd1;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic int pm(input int inst); return inst == 0 ? 283 : 163; endfunction
  function automatic int pw(input int inst); return inst == 0 ? 16 : 8; endfunction
  function automatic int pmu(input int inst); return inst == 0 ? -1 : 1; endfunction
  function automatic int ph(input int inst); return inst == 0 ? 3 : 2; endfunction
  function automatic int nw(input int inst); return (pm(inst) + pw(inst) - 1) / pw(inst); endfunction
  function automatic int nw1(input int inst); return (pm(inst) + 7 + pw(inst) - 1) / pw(inst); endfunction

  function automatic void mset(input int inst, input int addr, input logic [15:0] v);
    if (inst == 0) mem0[addr] = v;
    else           mem1[addr] = v[7:0];
  endfunction
  function automatic logic [15:0] mget(input int inst, input int addr);
    return (inst == 0) ? mem0[addr] : {8'h00, mem1[addr]};
  endfunction

  // store digits d[] (signed) and remainder (r0, r1) in the region at base
  function automatic void put_exp(input int inst, input int base, input int d[],
                                  input int r0, input int r1);
    int w, n1;
    logic [15:0] v, s;
    w = pw(inst); n1 = nw1(inst);
    for (int j = 0; j < n1; j++) begin
      v = '0; s = '0;
      for (int b = 0; b < w; b++) begin
        if (j * w + b < d.size()) begin
          v[b] = (d[j*w+b] != 0);
          s[b] = (d[j*w+b] < 0);
        end
      end
      mset(inst, base + j, v);
      mset(inst, base + n1 + 1 + j, s);
    end
    mset(inst, base + n1, rem_word(inst, r0, r1));
  endfunction

  function automatic logic [15:0] rem_word(input int inst, input int r0, input int r1);
    if (inst == 0) return {8'(r1), 8'(r0)};
    else           return {8'h00, 4'(r1), 4'(r0)};
  endfunction

  function automatic void get_exp(input int inst, input int base, input int n,
                                  output int d[]);
    int w;
    w = pw(inst);
    d = new[n];
    foreach (d[i]) d[i] = int'(mget(inst, base + i / w)[i % w]);
  endfunction

  task automatic run(input int inst, input logic alg1, input logic signed_b,
                     input logic azero, input logic inplace);
    int A[], B[], C[], m, mu, w, a0, a1, b0, b1, cyc, exp_cyc, n, dst, hi, gr0, gr1;
    zt_t lhs, rhs;
    m = pm(inst); mu = pmu(inst); w = pw(inst);
    n = alg1 ? m : m;
    A = new[n]; B = new[n];
    foreach (A[i]) begin
      A[i] = azero ? 0 : int'($urandom_range(1));
      B[i] = signed_b ? int'($urandom_range(2)) - 1 : int'($urandom_range(1));
    end
    if (alg1) begin a0 = 0; a1 = 0; b0 = 0; b1 = 0; end
    else begin
      rand_s0(a0, a1, mu);
      rand_s0(b0, b1, mu);
      if (azero) begin a0 = 0; a1 = 0; end
    end
    put_exp(inst, BA, A, a0, a1);
    put_exp(inst, BB, B, b0, b1);
    // clutter the destination
    for (int j = 0; j <= nw1(inst); j++) mset(inst, BD + j, 16'hffff);
    dst = inplace ? BA : BD;
    @(negedge clk);
    cmd.alg1 = alg1; cmd.b_signed = signed_b; cmd.a_zero = azero;
    cmd.a_base = addr_t'(BA); cmd.b_base = addr_t'(BB); cmd.d_base = addr_t'(dst);
    if (inst == 0) start0 = 1'b1; else start1 = 1'b1;
    @(negedge clk);
    start0 = 1'b0; start1 = 1'b0;
    cyc = 1;
    while (!((inst == 0) ? done0 : done1)) begin
      @(negedge clk);
      cyc++;
      if (cyc > 5000) break;
    end
    @(negedge clk);
    if (alg1) exp_cyc = nw1(inst) * (w / 4 + ph(inst)) + (signed_b ? nw1(inst) : 0);
    else      exp_cyc = nw(inst) * (w / 4 + ph(inst)) + ph(inst) + 1 + (signed_b ? nw(inst) : 0);
    check(cyc == exp_cyc, $sformatf("inst %0d alg1=%0d latency %0d, expected %0d", inst, alg1, cyc, exp_cyc));
    if (alg1) begin
      get_exp(inst, dst, nw1(inst) * w, C);
      lhs = zt_eval(C, mu);
      rhs = zt_add(zt_eval(A, mu), zt_eval(B, mu));
      check(zt_eq(lhs, rhs), $sformatf("inst %0d Alg. 1: C != A + B", inst));
      check(!((inst == 0) ? cnz0 : cnz1), "Alg. 1 carry has died out");
    end else begin
      get_exp(inst, dst, m, C);
      gr0 = int'(signed'((inst == 0) ? g00 : g01));
      gr1 = int'(signed'((inst == 0) ? g10 : g11));
      lhs = zt_add(zt_eval(C, mu), zt_mul_pow(zt_make(gr0, gr1), m, mu));
      rhs = zt_add(zt_add(zt_eval(A, mu), zt_eval(B, mu)), zt_make(a0 + b0, a1 + b1));
      check(zt_eq(lhs, rhs), $sformatf("inst %0d Alg. 6: C + tau^m g != A + B + alpha + beta", inst));
      if (!signed_b) check(in_s0(gr0, gr1, mu), "gamma in the state set");
      // remainder word written, digits >= M are zero
      hi = int'(mget(inst, dst + nw1(inst)));
      check(hi == int'(rem_word(inst, gr0, gr1)), "remainder word in RAM");
      for (int i = m; i < nw(inst) * w; i++)
        check(mget(inst, dst + i / w)[i % w] == 1'b0, "digit beyond M is zero");
    end
  endtask

  function automatic zt_t zt_mul_pow(input zt_t v, input int e, input int mu);
    zt_t r;
    r = v;
    for (int i = 0; i < e; i++) r = zt_mul_tau(r, mu);
    return r;
  endfunction

  initial begin
    start0 = 0; start1 = 0; cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int inst = 0; inst < 2; inst++) begin
      for (int t = 0; t < 12; t++) run(inst, 1'b0, 1'b0, 1'b0, 1'b0);
      for (int t = 0; t < 6; t++)  run(inst, 1'b0, 1'b1, 1'b0, 1'b0);
      for (int t = 0; t < 4; t++)  run(inst, 1'b0, 1'b1, 1'b1, 1'b0);
      for (int t = 0; t < 4; t++)  run(inst, 1'b0, 1'b0, 1'b0, 1'b1);
      for (int t = 0; t < 8; t++)  run(inst, 1'b1, 1'b0, 1'b0, 1'b0);
      for (int t = 0; t < 4; t++)  run(inst, 1'b1, 1'b1, 1'b0, 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
