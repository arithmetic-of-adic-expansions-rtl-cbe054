// ptau_add_dp: datapath extension for addition of partial tau-adic expansions
// (Alg. 6), unrolled OMEGA times.
//
// An addition of (A, alpha) and (B, beta) runs for exactly M digits.  The
// carry register (t0, t1) is first loaded with alpha + beta (the sum is formed
// by the surrounding ALU), so it needs 4 bits per component: t0 in [-6,6],
// t1 in [-4,4].  Each enabled clock consumes OMEGA digits through OMEGA copies
// of tau_step.  Because M is prime, OMEGA does not divide it; on the final
// step ('last') the carry register takes the output of stage M mod OMEGA
// instead of stage OMEGA, so that the stored carry is the one after digit M-1.
// That carry is the remainder part gamma of the result.
//
// Interface: 'load' writes t0_in/t1_in into the carry (has priority over
// 'en'); 'en' consumes a/b_lo/b_hi (digit i: a[i] and {b_hi[i], b_lo[i]} in
// two's complement) and updates the carry; c[] is combinational.  Result bits
// of stages beyond M mod OMEGA on the last step are not part of the result
// and are ignored by the controller.
//
// Register widths, the load path and the last-step multiplexer follow the
// document's Fig. 5(b) and Sect. 7.1.  As the document suggests for wide
// unrolling, stages from the eighth on (OMEGA >= 8) use the 3-bit logic of
// Alg. 1: by then the carry is back in the 21-state set.  The further
// narrowing of earlier stages the document mentions is not applied.
module ptau_add_dp #(
  parameter int unsigned M     = 283,
  parameter int unsigned OMEGA = 4,
  parameter int          MU    = -1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic signed [3:0] t0_in,
  input  logic signed [3:0] t1_in,
  input  logic             en,
  input  logic             last,
  input  logic [OMEGA-1:0] a,
  input  logic [OMEGA-1:0] b_lo,
  input  logic [OMEGA-1:0] b_hi,
  output logic [OMEGA-1:0] c,
  output logic signed [3:0] t0,
  output logic signed [3:0] t1
);
  localparam int unsigned TW = 4;
  // Stage whose output is the carry after digit M-1 on the last step.
  localparam int unsigned LAST_STAGE = (M % OMEGA == 0) ? OMEGA : (M % OMEGA);
  // First stage that may use 3-bit carry logic: whatever alpha + beta was,
  // the carry is in the Alg. 1 state set after seven digits (M > 6).
  localparam int unsigned NARROW_FROM = 7;

  // Carry between stages: g_stage[g].o0/o1 is the carry after stage g.
  for (genvar g = 0; g < OMEGA; g++) begin : g_stage
    logic signed [TW-1:0] i0, i1, o0, o1;
    if (g == 0) begin : g_first
      assign i0 = t0;
      assign i1 = t1;
    end else begin : g_next
      assign i0 = g_stage[g-1].o0;
      assign i1 = g_stage[g-1].o1;
    end
    if (g < NARROW_FROM) begin : g_wide
      tau_step #(.TW(TW), .MU(MU)) u_step (
        .a   (a[g]),
        .b   ({b_hi[g], b_lo[g]}),
        .t0  (i0),
        .t1  (i1),
        .c   (c[g]),
        .t0_n(o0),
        .t1_n(o1)
      );
    end else begin : g_narrow
      // After seven digits the carry is back in the 21-state set of Alg. 1,
      // so the remaining stages need only the 3-bit logic of tau_add_dp.
      logic signed [2:0] n0, n1;
      tau_step #(.TW(3), .MU(MU)) u_step (
        .a   (a[g]),
        .b   ({b_hi[g], b_lo[g]}),
        .t0  (i0[2:0]),
        .t1  (i1[2:0]),
        .c   (c[g]),
        .t0_n(n0),
        .t1_n(n1)
      );
      assign o0 = TW'(n0);
      assign o1 = TW'(n1);
    end
  end

  logic signed [TW-1:0] s0_last, s1_last, s0_full, s1_full;
  assign s0_last = g_stage[LAST_STAGE-1].o0;
  assign s1_last = g_stage[LAST_STAGE-1].o1;
  assign s0_full = g_stage[OMEGA-1].o0;
  assign s1_full = g_stage[OMEGA-1].o1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0 <= '0;
      t1 <= '0;
    end else if (load) begin
      t0 <= t0_in;
      t1 <= t1_in;
    end else if (en) begin
      t0 <= last ? s0_last : s0_full;
      t1 <= last ? s1_last : s1_full;
    end
  end

  // Carry entering the 3-bit stages is inside the Alg. 1 state set.
  if (OMEGA > NARROW_FROM) begin : g_narrow_chk
    a_narrow_range : assert property (@(posedge clk) disable iff (!rst_n)
        en |-> (g_stage[NARROW_FROM].i0 >= -3) && (g_stage[NARROW_FROM].i0 <= 3) &&
               (g_stage[NARROW_FROM].i1 >= -2) && (g_stage[NARROW_FROM].i1 <= 2));
  end

  // alpha + beta of two remainders from the 21-state set stays in range.
  a_load_range : assert property (@(posedge clk) disable iff (!rst_n)
      load |-> (t0_in >= -6) && (t0_in <= 6) && (t1_in >= -4) && (t1_in <= 4));
endmodule
