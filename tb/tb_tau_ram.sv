// tb_tau_ram: self-checking test of the word RAM.
//
// A single-port instance (the default) and a dual-port one.  Every word is
// written with a random value, then read back through port 0 and, on the
// dual-port instance, through port 1 at a different address in the same
// cycle.  Reads are combinational; a write appears at the next clock edge.
// The single-port instance must return 0 on port 1.
module tb_tau_ram;
  import tau_pkg::*;

  localparam int unsigned DEPTH = 160;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        we;
  addr_t       a0, a1;
  logic [15:0] wd, r0, r1, s0, s1;
  logic [15:0] model [DEPTH];

  tau_ram dut_sp (.clk, .we0(we), .addr0(a0), .wdata0(wd), .rdata0(s0), .addr1(a1), .rdata1(s1));
  tau_ram #(.DUAL_PORT(1'b1)) dut_dp (
    .clk, .we0(we), .addr0(a0), .wdata0(wd), .rdata0(r0), .addr1(a1), .rdata1(r1));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    we = 0; a0 = '0; a1 = '0; wd = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 16'($urandom);
      we = 1'b1; a0 = addr_t'(i); wd = model[i];
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      a0 = addr_t'(i);
      a1 = addr_t'((i * 7 + 3) % DEPTH);
      #1;
      check(r0 == model[i], "dual-port read port 0");
      check(r1 == model[(i * 7 + 3) % DEPTH], "dual-port read port 1");
      check(s0 == model[i], "single-port read");
      check(s1 == '0, "single-port has no second port");
      @(negedge clk);
    end
    // a write is visible after the edge, not before
    a0 = 5; wd = ~model[5]; we = 1'b1;
    #1 check(r0 == model[5], "write not visible before the edge");
    @(negedge clk);
    we = 1'b0;
    #1 check(r0 == ~model[5], "write visible after the edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
