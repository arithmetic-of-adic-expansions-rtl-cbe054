// ptau_seq: word-serial sequencer for one tau-adic addition on the RAM.
//
// Executes dst = srcA + srcB either with Alg. 1 (plain binary tau-adic
// expansions, run over NW1 = ceil((M+7)/W) words so that the carry has died
// out) or with Alg. 6 (partial expansions: exactly M digits plus a remainder
// word).  For every word it fetches the operand words into the A and B shift
// registers, clocks W/OMEGA steps of OMEGA digits through the datapath
// extension (tau_add_dp or ptau_add_dp) while the result digits collect in
// the C shift register, and writes the result word back.  Alg. 6 first reads
// the two remainder words, adds them (this adder stands for the ALU adder the
// document assumes) and loads the sum into the carry register; at the end it
// writes the final carry as the remainder word gamma of the result.
//
// RAM region layout (base address R, NW = ceil(M/W)):
//   R .. R+NW1-1        expansion words, digit i in word i/W, bit i%W
//   R+NW1               remainder word: t0 in bits [W/2-1:0], t1 in
//                       [W-1:W/2], both sign-extended two's complement
//   R+NW1+1 .. R+2*NW1  sign plane of a signed-digit expansion (digit i is
//                       {sign bit, expansion bit} in two's complement)
//
// Latency with a single-port RAM (h = 3) or a dual-port RAM (h = 2), from the
// cycle after 'start' to the cycle in which 'done' is high, inclusive:
//   Alg. 6: NW*(W/OMEGA + h) + h + 1      Alg. 1: NW1*(W/OMEGA + h)
// A signed operand B costs one more read cycle per word.  Operand A may be
// the constant zero (cmd.a_zero): its reads still take place, so the timing
// does not change, but the data are replaced by zero.  These are the
// document's formulas (Sect. 7.2); every addition takes the same time
// whatever the operand values.  Result digits at positions >= M are written
// as zero in Alg. 6.  The RAM is read combinationally (tau_ram).
//
// Command handshake: 'start' with 'cmd' is accepted when 'busy' is low;
// 'done' is a one-cycle pulse on the final write.  'gamma_t0/t1' hold the
// final Alg. 6 carry and 'carry_nz' the final Alg. 1 carry until the next
// command.
module ptau_seq
  import tau_pkg::*;
#(
  parameter int unsigned M         = 283,
  parameter int unsigned W         = 16,
  parameter int unsigned OMEGA     = 4,
  parameter int          MU        = -1,
  parameter bit          DUAL_PORT = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  seq_cmd_t       cmd,
  output logic           busy,
  output logic           done,
  output logic signed [3:0] gamma_t0,
  output logic signed [3:0] gamma_t1,
  output logic           gamma_nz,
  output logic           carry_nz,
  // RAM port
  output logic           mem_we,
  output addr_t          mem_addr0,
  output logic [W-1:0]   mem_wdata,
  input  logic [W-1:0]   mem_rdata0,
  output addr_t          mem_addr1,
  input  logic [W-1:0]   mem_rdata1
);
  localparam int unsigned NW        = (M + W - 1) / W;
  localparam int unsigned NW1       = (M + 7 + W - 1) / W;
  localparam int unsigned SPW       = W / OMEGA;          // steps per word
  localparam int unsigned LAST_STEP = (M - 1) / OMEGA;    // Alg. 6 final step
  localparam int unsigned HW        = W / 2;

  typedef enum logic [3:0] {
    S_IDLE, S_RD_AL, S_RD_BE, S_INIT, S_RD_A, S_RD_B, S_RD_BS, S_SHIFT, S_WR, S_WR_G
  } state_e;

  state_e   state;
  seq_cmd_t c_q;
  logic [$clog2(NW1+1)-1:0] word;
  logic [$clog2(SPW+1)-1:0] k;
  logic [15:0]              step;         // global step index in this addition
  logic signed [3:0]        al0, al1, be0, be1;

  // shift registers
  logic             ld_a, ld_b, ld_bs, shift;
  logic [W-1:0]     d_a, d_b, d_bs;
  logic [OMEGA-1:0] a_dig, b_lo, b_hi, c_dig, c1, c6;
  logic [W-1:0]     q_c;

  logic             last_word;
  logic             dp6_en, dp6_last, dp6_load, dp1_clr, dp1_en, c1_zero;
  logic signed [3:0] ld0, ld1;
  logic signed [2:0] t1_0, t1_1;

  assign last_word = c_q.alg1 ? (32'(word) == NW1 - 1) : (32'(word) == NW - 1);

  // ---------------- control state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      c_q   <= '0;
      word  <= '0;
      k     <= '0;
      step  <= '0;
      al0 <= '0; al1 <= '0; be0 <= '0; be1 <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          c_q  <= cmd;
          word <= '0;
          k    <= '0;
          step <= '0;
          state <= cmd.alg1 ? S_RD_A : S_RD_AL;
        end
        S_RD_AL: begin
          al0 <= c_q.a_zero ? 4'sd0 : mem_rdata0[3:0];
          al1 <= c_q.a_zero ? 4'sd0 : mem_rdata0[HW+3:HW];
          if (DUAL_PORT) begin
            be0 <= mem_rdata1[3:0];
            be1 <= mem_rdata1[HW+3:HW];
            state <= S_INIT;
          end else begin
            state <= S_RD_BE;
          end
        end
        S_RD_BE: begin
          be0 <= mem_rdata0[3:0];
          be1 <= mem_rdata0[HW+3:HW];
          state <= S_INIT;
        end
        S_INIT: state <= S_RD_A;
        S_RD_A: state <= DUAL_PORT ? (c_q.b_signed ? S_RD_BS : S_SHIFT) : S_RD_B;
        S_RD_B: state <= c_q.b_signed ? S_RD_BS : S_SHIFT;
        S_RD_BS: state <= S_SHIFT;
        S_SHIFT: begin
          step <= step + 16'd1;
          if (32'(k) == SPW - 1) begin
            k     <= '0;
            state <= S_WR;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_WR: begin
          if (last_word) begin
            state <= c_q.alg1 ? S_IDLE : S_WR_G;
          end else begin
            word  <= word + 1'b1;
            state <= S_RD_A;
          end
        end
        S_WR_G: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = ((state == S_WR) && last_word && c_q.alg1) || (state == S_WR_G);

  // ---------------- RAM port ----------------
  always_comb begin
    mem_we    = 1'b0;
    mem_addr0 = '0;
    mem_addr1 = '0;
    mem_wdata = '0;
    unique case (state)
      S_RD_AL: begin
        mem_addr0 = c_q.a_base + addr_t'(NW1);
        mem_addr1 = c_q.b_base + addr_t'(NW1);
      end
      S_RD_BE: mem_addr0 = c_q.b_base + addr_t'(NW1);
      S_RD_A: begin
        mem_addr0 = c_q.a_base + addr_t'(word);
        mem_addr1 = c_q.b_base + addr_t'(word);
      end
      S_RD_B:  mem_addr0 = c_q.b_base + addr_t'(word);
      S_RD_BS: mem_addr0 = c_q.b_base + addr_t'(NW1 + 1) + addr_t'(word);
      S_WR: begin
        mem_we    = 1'b1;
        mem_addr0 = c_q.d_base + addr_t'(word);
        mem_wdata = q_c;
      end
      S_WR_G: begin
        mem_we    = 1'b1;
        mem_addr0 = c_q.d_base + addr_t'(NW1);
        mem_wdata = {HW'(gamma_t1), HW'(gamma_t0)};
      end
      default: ;
    endcase
  end

  // ---------------- operand and result registers ----------------
  always_comb begin
    ld_a  = (state == S_RD_A);
    d_a   = c_q.a_zero ? '0 : mem_rdata0;
    ld_b  = DUAL_PORT ? (state == S_RD_A) : (state == S_RD_B);
    d_b   = DUAL_PORT ? mem_rdata1 : mem_rdata0;
    // the sign plane is cleared with the A load and filled by S_RD_BS
    ld_bs = (state == S_RD_A) || (state == S_RD_BS);
    d_bs  = (state == S_RD_BS) ? mem_rdata0 : '0;
    shift = (state == S_SHIFT);
  end

  tau_shift_reg #(.W(W), .OMEGA(OMEGA)) u_sr_a (
    .clk, .rst_n, .load(ld_a), .d(d_a), .shift, .sin('0), .sout(a_dig), .q());
  tau_shift_reg #(.W(W), .OMEGA(OMEGA)) u_sr_b (
    .clk, .rst_n, .load(ld_b), .d(d_b), .shift, .sin('0), .sout(b_lo), .q());
  tau_shift_reg #(.W(W), .OMEGA(OMEGA)) u_sr_bs (
    .clk, .rst_n, .load(ld_bs), .d(d_bs), .shift, .sin('0), .sout(b_hi), .q());
  tau_shift_reg #(.W(W), .OMEGA(OMEGA)) u_sr_c (
    .clk, .rst_n, .load(1'b0), .d('0), .shift, .sin(c_dig), .sout(), .q(q_c));

  // ---------------- datapath extensions ----------------
  assign dp1_clr  = (state == S_IDLE) && start;
  assign dp1_en   = shift && c_q.alg1;
  assign dp6_load = (state == S_INIT);
  assign dp6_en   = shift && !c_q.alg1 && (32'(step) <= LAST_STEP);
  assign dp6_last = (32'(step) == LAST_STEP);
  assign ld0      = 4'(al0 + be0);
  assign ld1      = 4'(al1 + be1);

  tau_add_dp #(.OMEGA(OMEGA), .MU(MU)) u_dp1 (
    .clk, .rst_n, .clr(dp1_clr), .en(dp1_en),
    .a(a_dig), .b_lo, .b_hi, .c(c1), .t0(t1_0), .t1(t1_1), .carry_zero(c1_zero));

  ptau_add_dp #(.M(M), .OMEGA(OMEGA), .MU(MU)) u_dp6 (
    .clk, .rst_n, .load(dp6_load), .t0_in(ld0), .t1_in(ld1),
    .en(dp6_en), .last(dp6_last),
    .a(a_dig), .b_lo, .b_hi, .c(c6), .t0(gamma_t0), .t1(gamma_t1));

  // Alg. 6 result digits at index >= M are forced to zero.
  always_comb begin
    for (int g = 0; g < OMEGA; g++) begin
      if (c_q.alg1) c_dig[g] = c1[g];
      else          c_dig[g] = c6[g] && ((32'(step) * OMEGA + 32'(g)) < M);
    end
  end

  assign gamma_nz = (gamma_t0 != 0) || (gamma_t1 != 0);
  assign carry_nz = !c1_zero;

  // ---------------- static checks ----------------
  if (W % OMEGA != 0) begin : g_bad_omega
    $error("OMEGA must divide W");
  end
  if (W < 8) begin : g_bad_w
    $error("W must be at least 8 to hold a remainder word");
  end
endmodule
