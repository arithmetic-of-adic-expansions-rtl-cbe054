// tau_add_dp: datapath extension for tau-adic addition with Alg. 1.
//
// Adds a binary expansion A (digits 0/1) and a signed-digit expansion B
// (digits -1/0/+1), least significant digit first, OMEGA digits per enabled
// clock, and emits the binary result digits C.  The carry t = t0 + t1*tau
// lives in a 6-bit register: with these digit sets t0 stays in [-3,3] and t1
// in [-2,2], so 3 bits each suffice.  The per-digit logic is tau_step,
// replicated OMEGA times; only one carry register exists.
//
// Interface: 'clr' zeroes the carry (start of an addition), 'en' consumes the
// OMEGA digits on a/b_lo/b_hi (digit i is a[i], and {b_hi[i], b_lo[i]} in
// two's complement) and updates the carry at the clock edge.  c[] is
// combinational from the current carry and inputs.  'carry_zero' tells the
// controller that, once the inputs are exhausted, no further digit follows.
//
// The carry width, digit coding and update rule follow the document's Alg. 1
// and its 6-flip-flop datapath; the unroll factor is a parameter (the document
// synthesised OMEGA = 1).  Synchronous clear and active-low reset are this
// design's choices.
module tau_add_dp #(
  parameter int unsigned OMEGA = 1,
  parameter int          MU    = -1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [OMEGA-1:0] a,
  input  logic [OMEGA-1:0] b_lo,
  input  logic [OMEGA-1:0] b_hi,
  output logic [OMEGA-1:0] c,
  output logic signed [2:0] t0,
  output logic signed [2:0] t1,
  output logic             carry_zero
);
  localparam int unsigned TW = 3;

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
    tau_step #(.TW(TW), .MU(MU)) u_step (
      .a   (a[g]),
      .b   ({b_hi[g], b_lo[g]}),
      .t0  (i0),
      .t1  (i1),
      .c   (c[g]),
      .t0_n(o0),
      .t1_n(o1)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t0 <= '0;
      t1 <= '0;
    end else if (clr) begin
      t0 <= '0;
      t1 <= '0;
    end else if (en) begin
      t0 <= g_stage[OMEGA-1].o0;
      t1 <= g_stage[OMEGA-1].o1;
    end
  end

  assign carry_zero = (t0 == 0) && (t1 == 0);

  // The carry must stay in the state set of the Alg. 1 state machine.
  a_carry_range : assert property (@(posedge clk) disable iff (!rst_n)
      (t0 >= -3) && (t1 >= -2) && (t1 <= 2));
endmodule
