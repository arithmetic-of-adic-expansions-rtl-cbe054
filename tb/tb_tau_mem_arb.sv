// tb_tau_mem_arb: self-checking test of the RAM port selection.
//
// Random requests from the sequencer, the multiplication controller and the
// host under all four busy combinations; the selected port must follow the
// priority sequencer > multiplication controller > host, the controller may
// only read, and the host is told it owns the RAM only when both are idle.
module tb_tau_mem_arb;
  import tau_pkg::*;

  int checks = 0, failures = 0;

  logic        seq_busy, seq_we, mul_busy, host_we, ram_we, host_ready;
  addr_t       seq_addr0, seq_addr1, mul_addr, host_addr, ram_addr0, ram_addr1;
  logic [15:0] seq_wdata, host_wdata, ram_wdata;

  tau_mem_arb dut (.*);

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    for (int t = 0; t < 400; t++) begin
      {seq_busy, mul_busy} = 2'(t % 4);
      seq_we = 1'($urandom); host_we = 1'($urandom);
      seq_addr0 = addr_t'($urandom); seq_addr1 = addr_t'($urandom);
      mul_addr = addr_t'($urandom); host_addr = addr_t'($urandom);
      seq_wdata = 16'($urandom); host_wdata = 16'($urandom);
      #1;
      check(ram_addr1 == seq_addr1, "second read port follows the sequencer");
      if (seq_busy) begin
        check(ram_we == seq_we && ram_addr0 == seq_addr0 && ram_wdata == seq_wdata, "sequencer owns RAM");
        check(!host_ready, "host locked out");
      end else if (mul_busy) begin
        check(!ram_we && ram_addr0 == mul_addr, "controller reads RAM");
        check(!host_ready, "host locked out");
      end else begin
        check(ram_we == host_we && ram_addr0 == host_addr && ram_wdata == host_wdata, "host owns RAM");
        check(host_ready, "host ready when idle");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
