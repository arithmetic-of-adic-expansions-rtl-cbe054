// tb_tau_shift_reg: self-checking test of the operand/result shift register.
//
// Default instance (W = 16, OMEGA = 4) and a W = 8, OMEGA = 8 instance (a full
// word per shift).  Checks that a loaded word comes out OMEGA bits at a time,
// least significant first, that digits shifted in at the top assemble into
// the word in order, and that load has priority over shift.
module tb_tau_shift_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        load, shift;
  logic [15:0] d, q;
  logic [3:0]  sin, sout;
  logic [7:0]  d8, q8, sin8, sout8;

  tau_shift_reg dut (.clk, .rst_n, .load, .d, .shift, .sin, .sout, .q);
  tau_shift_reg #(.W(8), .OMEGA(8)) dut8 (
    .clk, .rst_n, .load, .d(d8), .shift, .sin(sin8), .sout(sout8), .q(q8));

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  initial begin
    logic [15:0] w, v;
    load = 0; shift = 0; d = '0; sin = '0; d8 = '0; sin8 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      w = 16'($urandom);
      v = 16'($urandom);
      @(negedge clk);
      load = 1'b1; d = w; d8 = w[7:0];
      @(negedge clk);
      load = 1'b0;
      check(q == w, "parallel load");
      check(q8 == w[7:0], "parallel load W=8");
      for (int k = 0; k < 4; k++) begin
        check(sout == w[4*k +: 4], $sformatf("digit group %0d out", k));
        sin = v[4*k +: 4];
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
      check(q == v, "digits shifted in assemble the word");
      sin8 = v[15:8];
      shift = 1'b1;
      @(negedge clk);
      check(q8 == v[15:8], "full-word shift W=8");
      // load wins over shift
      load = 1'b1; d = ~v;
      @(negedge clk);
      load = 1'b0; shift = 1'b0;
      check(q == ~v, "load has priority");
    end
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
