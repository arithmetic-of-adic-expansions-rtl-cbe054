// tb_tau_workloads: the b x K workload over the configurations the document
// evaluates.  For NIST K-283 with 16-bit words and a single-port RAM, it
// covers every unroll factor of Table 4: omega = 1, 2, 4, 8, 16.  It also
// runs the three curves K-163 (MU = +1), K-233 and K-283 at omega = 4 with
// single- and dual-port RAMs, as in Table 1.
//
// Each configuration is a tau_wl_run instance.  It computes one Alg. 8 and
// one Alg. 7 product with a full-length b, checks the result by value and
// checks the cycle count against the design's formula.  All instances run
// side by side on one clock.  At the end a table of measured latencies is
// printed next to the document's Table 4 figures (these include control
// overheads that are not described, so they are reported, not checked).
// The testbench also checks that the ladder gets faster as omega grows.
module tb_tau_workloads;
  localparam int N = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ck [N], fl [N], c8 [N], c7 [N];
  bit fin [N];

  // K-283, W = 16, single port, omega = 1, 2, 4, 8, 16
  tau_wl_run #(.M(283), .W(16), .OMEGA(1),  .MU(-1), .DUAL_PORT(1'b0)) r0 (
    .clk, .checks(ck[0]), .failures(fl[0]), .cyc8(c8[0]), .cyc7(c7[0]), .fin(fin[0]));
  tau_wl_run #(.M(283), .W(16), .OMEGA(2),  .MU(-1), .DUAL_PORT(1'b0)) r1 (
    .clk, .checks(ck[1]), .failures(fl[1]), .cyc8(c8[1]), .cyc7(c7[1]), .fin(fin[1]));
  tau_wl_run #(.M(283), .W(16), .OMEGA(4),  .MU(-1), .DUAL_PORT(1'b0)) r2 (
    .clk, .checks(ck[2]), .failures(fl[2]), .cyc8(c8[2]), .cyc7(c7[2]), .fin(fin[2]));
  tau_wl_run #(.M(283), .W(16), .OMEGA(8),  .MU(-1), .DUAL_PORT(1'b0)) r3 (
    .clk, .checks(ck[3]), .failures(fl[3]), .cyc8(c8[3]), .cyc7(c7[3]), .fin(fin[3]));
  tau_wl_run #(.M(283), .W(16), .OMEGA(16), .MU(-1), .DUAL_PORT(1'b0)) r4 (
    .clk, .checks(ck[4]), .failures(fl[4]), .cyc8(c8[4]), .cyc7(c7[4]), .fin(fin[4]));
  // omega = 4, the other curves and the dual-port RAM
  tau_wl_run #(.M(283), .W(16), .OMEGA(4),  .MU(-1), .DUAL_PORT(1'b1)) r5 (
    .clk, .checks(ck[5]), .failures(fl[5]), .cyc8(c8[5]), .cyc7(c7[5]), .fin(fin[5]));
  tau_wl_run #(.M(163), .W(16), .OMEGA(4),  .MU(1),  .DUAL_PORT(1'b0)) r6 (
    .clk, .checks(ck[6]), .failures(fl[6]), .cyc8(c8[6]), .cyc7(c7[6]), .fin(fin[6]));
  tau_wl_run #(.M(163), .W(16), .OMEGA(4),  .MU(1),  .DUAL_PORT(1'b1)) r7 (
    .clk, .checks(ck[7]), .failures(fl[7]), .cyc8(c8[7]), .cyc7(c7[7]), .fin(fin[7]));
  tau_wl_run #(.M(233), .W(16), .OMEGA(4),  .MU(-1), .DUAL_PORT(1'b0)) r8 (
    .clk, .checks(ck[8]), .failures(fl[8]), .cyc8(c8[8]), .cyc7(c7[8]), .fin(fin[8]));
  tau_wl_run #(.M(233), .W(16), .OMEGA(4),  .MU(-1), .DUAL_PORT(1'b1)) r9 (
    .clk, .checks(ck[9]), .failures(fl[9]), .cyc8(c8[9]), .cyc7(c7[9]), .fin(fin[9]));

  function automatic bit all_fin();
    foreach (fin[i]) if (!fin[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    string name [N] = '{"K-283 w=1  single", "K-283 w=2  single", "K-283 w=4  single",
                        "K-283 w=8  single", "K-283 w=16 single", "K-283 w=4  dual  ",
                        "K-163 w=4  single", "K-163 w=4  dual  ", "K-233 w=4  single",
                        "K-233 w=4  dual  "};
    int doc [N] = '{206000, 126000, 85000, 66000, 55000, 0, 0, 0, 0, 0};
    @(posedge clk);
    while (!all_fin()) @(posedge clk);
    $display("configuration       Alg. 8 cycles  Alg. 7 cycles  Table 4 (approx.)");
    for (int i = 0; i < N; i++) begin
      checks += ck[i];
      failures += fl[i];
      if (doc[i] != 0)
        $display("%s  %13d  %13d  %17d", name[i], c8[i], c7[i], doc[i]);
      else
        $display("%s  %13d  %13d  %17s", name[i], c8[i], c7[i], "-");
    end
    // the ladder's latency falls with omega, and dual port beats single port
    for (int i = 1; i < 5; i++) begin
      checks++;
      if (c8[i] >= c8[i-1]) begin
        failures++;
        $display("FAIL: ladder not faster at configuration %0d", i);
      end
    end
    checks++;
    if (c8[5] >= c8[2]) begin
      failures++;
      $display("FAIL: dual-port ladder not faster than single-port");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
