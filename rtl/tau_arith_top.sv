// tau_arith_top: tau-adic arithmetic unit for lightweight Koblitz-curve
// cryptography.
//
// A constrained device that draws its ECDSA nonce directly as a tau-adic
// expansion K can compute the blinded value s_d = b x K without ever
// converting K to an integer: the result stays a tau-adic expansion and the
// conversion is left to the verifying server.  This unit provides that
// arithmetic: word-serial additions of tau-adic expansions (Alg. 1), of
// partial tau-adic expansions (Alg. 6, an m-digit binary expansion plus a
// small remainder t0 + t1*tau that needs no folding), and the product b x K by
// double-and-add (Alg. 7) or by a Montgomery ladder (Alg. 8).
//
// Blocks: tau_ram (W-bit word RAM), ptau_seq (one addition: shift registers
// and both datapath extensions, tau_add_dp and ptau_add_dp), tau_mul_ctrl
// (multiplication schedules) and tau_mem_arb (RAM port selection).
//
// RAM map (NW = ceil(M/W) words per expansion, NW1 = ceil((M+7)/W)):
//   region K  at 0                 : NW1 words, remainder word, NW1 sign words
//   region B  at BASE_B = 2*NW1+1  : NW1 words, remainder word
//   region C  at BASE_C = BASE_B+NW1+1 (result of the multiplications)
//   region D  at BASE_D = BASE_C+NW1+1
//   integer b at BASE_I = BASE_D+NW1+1 : NW words, bit i in word i/W
// Digit i of an expansion is bit i%W of word i/W.  A signed digit of K is
// {sign-plane bit, expansion bit} in two's complement (+1 = 01, -1 = 11).  The
// remainder word holds t0 in its low half and t1 in its high half, sign
// extended.  For the multiplications, K's remainder word carries the digits
// K_m and K_(m+1) of an (m+2)-digit expansion, as (t0, t1) = (K_m, K_(m+1)).
//
// Host interface: the RAM port (host_*) works while 'busy' is low; reads are
// combinational.  A command is given by pulsing 'start' with 'op':
//   OP_ADD1 / OP_ADD6: region dst <- region src_a + region src_b, with
//     'a_zero' (operand A is zero) and 'b_signed' (operand B uses its sign
//     plane); OP_MUL7 / OP_MUL8: region C <- b x K, 'b_msb' = floor(log2 b).
// 'done' pulses when the command has finished.  'gamma_*' give the remainder
// of the last Alg. 6 addition, 'carry_nz' flags an Alg. 1 addition whose carry
// had not died out, 'embed_*' report the final remainder folding of a
// multiplication.
//
// Defaults follow the document's main comparison point: NIST K-283
// (M = 283, MU = -1), a 16-bit ALU word and a single-port RAM, with unroll
// factor OMEGA = 4.  The register-file RAM, the map above and the host
// interface are this design's choices.
module tau_arith_top
  import tau_pkg::*;
#(
  parameter int unsigned M         = 283,
  parameter int unsigned W         = 16,
  parameter int unsigned OMEGA     = 4,
  parameter int          MU        = -1,
  parameter bit          DUAL_PORT = 1'b0,
  parameter int unsigned MAX_EMBED = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // host RAM port
  input  logic          host_we,
  input  addr_t         host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic [W-1:0]  host_rdata,
  output logic          host_ready,
  // command
  input  logic          start,
  input  op_e           op,
  input  region_e       src_a,
  input  region_e       src_b,
  input  region_e       dst,
  input  logic          a_zero,
  input  logic          b_signed,
  input  logic [AW-1:0] b_msb,
  output logic          busy,
  output logic          done,
  output logic signed [3:0] gamma_t0,
  output logic signed [3:0] gamma_t1,
  output logic          carry_nz,
  output logic          embed_fail,
  output logic [2:0]    embed_count
);
  localparam int unsigned NW     = (M + W - 1) / W;
  localparam int unsigned NW1    = (M + 7 + W - 1) / W;
  localparam int unsigned BASE_K = 0;
  localparam int unsigned BASE_B = 2 * NW1 + 1;
  localparam int unsigned BASE_C = BASE_B + NW1 + 1;
  localparam int unsigned BASE_D = BASE_C + NW1 + 1;
  localparam int unsigned BASE_I = BASE_D + NW1 + 1;
  localparam int unsigned DEPTH  = BASE_I + NW;

  function automatic addr_t region_base(input region_e r);
    unique case (r)
      REG_K:   return addr_t'(BASE_K);
      REG_B:   return addr_t'(BASE_B);
      REG_C:   return addr_t'(BASE_C);
      default: return addr_t'(BASE_D);
    endcase
  endfunction

  // sequencer
  logic     seq_start, seq_busy, seq_done, seq_gnz, seq_we;
  seq_cmd_t seq_cmd, host_cmd, mul_cmd;
  addr_t    seq_a0, seq_a1;
  logic [W-1:0] seq_wd;
  // multiplication controller
  logic     mul_start, mul_busy, mul_done, mul_seq_start;
  addr_t    mul_addr;
  // RAM
  logic     ram_we;
  addr_t    ram_a0, ram_a1;
  logic [W-1:0] ram_wd, ram_rd0, ram_rd1;

  logic     idle, add_cmd, add_run;

  assign idle      = !seq_busy && !mul_busy;
  assign add_cmd   = (op == OP_ADD1) || (op == OP_ADD6);
  assign mul_start = start && idle && !add_cmd;

  always_comb begin
    host_cmd          = '0;
    host_cmd.alg1     = (op == OP_ADD1);
    host_cmd.a_zero   = a_zero;
    host_cmd.b_signed = b_signed;
    host_cmd.a_base   = region_base(src_a);
    host_cmd.b_base   = region_base(src_b);
    host_cmd.d_base   = region_base(dst);
  end

  assign seq_start = mul_busy ? mul_seq_start : (start && idle && add_cmd);
  assign seq_cmd   = mul_busy ? mul_cmd : host_cmd;

  // remembers that the running addition came from the host
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                              add_run <= 1'b0;
    else if (start && idle && add_cmd)       add_run <= 1'b1;
    else if (seq_done)                       add_run <= 1'b0;
  end

  ptau_seq #(.M(M), .W(W), .OMEGA(OMEGA), .MU(MU), .DUAL_PORT(DUAL_PORT)) u_seq (
    .clk, .rst_n,
    .start(seq_start), .cmd(seq_cmd), .busy(seq_busy), .done(seq_done),
    .gamma_t0, .gamma_t1, .gamma_nz(seq_gnz), .carry_nz,
    .mem_we(seq_we), .mem_addr0(seq_a0), .mem_wdata(seq_wd), .mem_rdata0(ram_rd0),
    .mem_addr1(seq_a1), .mem_rdata1(ram_rd1));

  tau_mul_ctrl #(.W(W), .MAX_EMBED(MAX_EMBED)) u_mul (
    .clk, .rst_n,
    .start(mul_start), .ladder(op == OP_MUL8), .b_msb,
    .base_k(addr_t'(BASE_K)), .base_b(addr_t'(BASE_B)), .base_c(addr_t'(BASE_C)),
    .base_d(addr_t'(BASE_D)), .base_int(addr_t'(BASE_I)),
    .busy(mul_busy), .done(mul_done), .embed_fail, .embed_count,
    .seq_start(mul_seq_start), .seq_cmd(mul_cmd), .seq_done, .seq_gamma_nz(seq_gnz),
    .mem_addr(mul_addr), .mem_rdata(ram_rd0));

  tau_mem_arb #(.W(W)) u_arb (
    .seq_busy, .seq_we, .seq_addr0(seq_a0), .seq_wdata(seq_wd), .seq_addr1(seq_a1),
    .mul_busy, .mul_addr,
    .host_we, .host_addr, .host_wdata,
    .ram_we, .ram_addr0(ram_a0), .ram_wdata(ram_wd), .ram_addr1(ram_a1), .host_ready);

  tau_ram #(.W(W), .DEPTH(DEPTH), .AW(AW), .DUAL_PORT(DUAL_PORT)) u_ram (
    .clk, .we0(ram_we), .addr0(ram_a0), .wdata0(ram_wd), .rdata0(ram_rd0),
    .addr1(ram_a1), .rdata1(ram_rd1));

  assign host_rdata = ram_rd0;
  assign busy       = !idle;
  assign done       = mul_done || (seq_done && add_run);

  if (DEPTH > (1 << AW)) begin : g_too_deep
    $error("RAM map does not fit the address width");
  end
endmodule
