// tau_step: one digit iteration of the tau-adic addition loop (the part of the
// datapath extension that is replicated OMEGA times when it is unrolled).
//
// With the carry t = t0 + t1*tau, digit a in {0,1} and signed digit b in
// {-1,0,1}, it forms r = a + b + t0, emits the result digit c = r mod 2 and the
// next carry (t0, t1) <- (t1 + MU*floor(r/2), -floor(r/2)); that is, it divides
// (t - c) by tau using tau^2 = MU*tau - 2.  Purely combinational.
//
// The signed digit b uses two bits {b[1], b[0]} read as a two's-complement
// number (01 = +1, 11 = -1, 00 = 0).  TW is the width of each carry component;
// results are truncated to TW bits, which is exact whenever the carry stays in
// the bounded state set (3 bits for Alg. 1, 4 bits for Alg. 6).
module tau_step #(
  parameter int unsigned TW = 4,
  parameter int          MU = -1
) (
  input  logic                 a,
  input  logic [1:0]           b,
  input  logic signed [TW-1:0] t0,
  input  logic signed [TW-1:0] t1,
  output logic                 c,
  output logic signed [TW-1:0] t0_n,
  output logic signed [TW-1:0] t1_n
);
  localparam int unsigned RW = TW + 2;

  logic signed [RW-1:0] r, h, t0_w;

  always_comb begin
    r    = RW'(signed'(t0)) + RW'(signed'(b)) + RW'(signed'({1'b0, a}));
    c    = r[0];
    h    = r >>> 1;  // floor(r/2)
    t0_w = (MU > 0) ? RW'(signed'(t1)) + h : RW'(signed'(t1)) - h;
    t0_n = t0_w[TW-1:0];
    t1_n = TW'(-h);
  end
endmodule
