// tb_tau_mul_ctrl: self-checking test of the multiplication controller.
//
// The addition sequencer is replaced by a behavioural model that records each
// command and answers 'done' a fixed D cycles later, with a remainder flag
// the testbench chooses.  For random multipliers b (and b = 1, b = 2^k) the
// recorded command list must equal the schedule of Alg. 7 (double-and-add)
// or Alg. 8 (Montgomery ladder) worked out here from the bits of b; the
// number of additions must be floor(log2 b) + weight(b) + 1 for Alg. 7 and
// 2*floor(log2 b) + 3 for Alg. 8; the run must take ops*(D+1) + bits + 1
// cycles; a forced non-zero final remainder must cause the final folding to
// be repeated, and MAX_EMBED failures must raise 'embed_fail'.
module tb_tau_mul_ctrl;
  import tau_pkg::*;

  localparam int D = 5;
  localparam addr_t BK = 0, BBB = 40, BC = 60, BDD = 80, BI = 100;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        start, ladder, busy, done, efail, seq_start, seq_done, seq_gnz;
  logic [AW-1:0] b_msb;
  logic [2:0]  ecount;
  seq_cmd_t    seq_cmd;
  addr_t       mem_addr;
  logic [15:0] mem_rdata;
  logic [15:0] bmem [8];

  tau_mul_ctrl dut (
    .clk, .rst_n, .start, .ladder, .b_msb,
    .base_k(BK), .base_b(BBB), .base_c(BC), .base_d(BDD), .base_int(BI),
    .busy, .done, .embed_fail(efail), .embed_count(ecount),
    .seq_start, .seq_cmd, .seq_done, .seq_gamma_nz(seq_gnz),
    .mem_addr, .mem_rdata);

  assign mem_rdata = (mem_addr >= BI && mem_addr < BI + 8) ? bmem[mem_addr - BI] : 16'h0;

  // behavioural sequencer
  seq_cmd_t got [$];
  int       cnt, force_nz;
  always_ff @(posedge clk) begin
    if (seq_start) begin
      got.push_back(seq_cmd);
      cnt <= D;
    end else if (cnt > 0) begin
      cnt <= cnt - 1;
    end
  end
  assign seq_done = (cnt == 1);
  // the remainder of a final folding is reported non-zero force_nz times
  always_ff @(posedge clk) if (seq_done && got.size() > 0 && got[got.size()-1].a_zero &&
                               !got[got.size()-1].b_signed && force_nz > 0) force_nz <= force_nz - 1;
  assign seq_gnz = (force_nz > 0);

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic seq_cmd_t mk(input addr_t a, input addr_t b, input addr_t d,
                                  input logic az, input logic bs);
    seq_cmd_t r;
    r = '0;
    r.a_zero = az; r.b_signed = bs; r.a_base = a; r.b_base = b; r.d_base = d;
    return r;
  endfunction

  task automatic run(input logic lad, input logic [127:0] b, input int nz);
    seq_cmd_t exp_q [$];
    int msb, wt, cyc, nfin, exp_cyc;
    addr_t cs;
    msb = 0; wt = 0;
    for (int i = 0; i < 128; i++) if (b[i]) begin msb = i; wt++; end
    for (int j = 0; j < 8; j++) bmem[j] = b[16*j +: 16];
    // expected schedule
    if (!lad) begin
      exp_q.push_back(mk(BK, BK, BBB, 1, 1));
      cs = BBB;
      for (int i = msb - 1; i >= 0; i--) begin
        exp_q.push_back(mk(cs, cs, BC, 0, 0));
        cs = BC;
        if (b[i]) exp_q.push_back(mk(BC, BBB, BC, 0, 0));
      end
    end else begin
      exp_q.push_back(mk(BK, BK, BC, 1, 1));
      exp_q.push_back(mk(BC, BC, BDD, 0, 0));
      for (int i = msb - 1; i >= 0; i--) begin
        if (!b[i]) begin
          exp_q.push_back(mk(BDD, BC, BDD, 0, 0));
          exp_q.push_back(mk(BC, BC, BC, 0, 0));
        end else begin
          exp_q.push_back(mk(BC, BDD, BC, 0, 0));
          exp_q.push_back(mk(BDD, BDD, BDD, 0, 0));
        end
      end
      cs = BC;
    end
    nfin = (nz + 1 < 4) ? nz + 1 : 4;
    exp_q.push_back(mk(cs, cs, BC, 1, 0));
    for (int r = 1; r < nfin; r++) exp_q.push_back(mk(BC, BC, BC, 1, 0));
    got.delete();
    force_nz = nz;
    @(negedge clk);
    start = 1'b1; ladder = lad; b_msb = AW'(msb);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check(got.size() == exp_q.size(), $sformatf("lad=%0d: %0d additions, expected %0d",
                                                lad, got.size(), exp_q.size()));
    for (int i = 0; i < got.size() && i < exp_q.size(); i++)
      check(got[i] == exp_q[i], $sformatf("lad=%0d: addition %0d differs", lad, i));
    if (nz == 0) begin
      if (!lad) check(got.size() == msb + wt + 1, "Alg. 7 addition count");
      else      check(got.size() == 2 * msb + 3, "Alg. 8 addition count");
    end
    exp_cyc = exp_q.size() * (D + 1) + msb + 1;
    check(cyc == exp_cyc, $sformatf("lad=%0d: %0d cycles, expected %0d", lad, cyc, exp_cyc));
    check(int'(ecount) == nfin, "final folding count");
    check(efail == (nz >= 4), "embed_fail flag");
    @(negedge clk);
  endtask

  initial begin
    logic [127:0] b;
    start = 0; ladder = 0; b_msb = '0; cnt = 0; force_nz = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int lad = 0; lad < 2; lad++) begin
      run(lad[0], 128'd1, 0);
      run(lad[0], 128'd1 << 37, 0);
      run(lad[0], 128'hffff_ffff, 0);
      run(lad[0], 128'd23, 1);
      run(lad[0], 128'd77, 6);
      for (int t = 0; t < 20; t++) begin
        b = {$urandom, $urandom, $urandom, $urandom};
        b = b >> $urandom_range(120);
        if (b == 0) b = 1;
        run(lad[0], b, 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
