// tau_mul_ctrl: control of the multiplication b x K of an integer b by a
// signed-digit tau-adic expansion K, on partial tau-adic expansions.
//
// The controller issues additions to ptau_seq (all with Alg. 6) and scans the
// bits of b, most significant first.  Two schedules are supported:
//   ladder = 0, double-and-add (Alg. 7):
//     B <- K [+] 0; C starts as B (no copy is made: the first doubling reads
//     region B); for each bit: C <- C [+] C, and C <- C [+] B if the bit is 1.
//   ladder = 1, Montgomery ladder (Alg. 8):
//     C <- K [+] 0; D <- C [+] C; for each bit: if 0 then D <- D [+] C,
//     C <- C [+] C; if 1 then C <- C [+] D, D <- D [+] D.
// Both end with C <- C [+] 0, which folds the remainder back into the m-digit
// expansion; if the remainder is still non-zero the step is repeated, at most
// MAX_EMBED times in all ('embed_fail' reports the rare case where that was not
// enough).  The result is the m-digit binary expansion in region C.
//
// b is read from RAM words at 'base_int' (bit i in word i/W, bit i%W) and
// 'b_msb' is the position of its leading one, supplied by the host (in
// ECDSA that bit is fixed so that the run time is constant).  Every bit costs
// one RAM read followed by the additions, so the memory access pattern is the
// same for every bit; with the ladder the sequence of additions is too.
//
// Timing: one cycle to issue each addition (then the sequencer's latency), one
// cycle per bit to read it; 'done' pulses for one cycle at the end.
// The schedules are the document's Algs. 7 and 8; the region assignment, the
// host-supplied b_msb and the repetition bound are this design's choices.
module tau_mul_ctrl
  import tau_pkg::*;
#(
  parameter int unsigned W         = 16,
  parameter int unsigned MAX_EMBED = 4
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     start,
  input  logic     ladder,
  input  logic [AW-1:0] b_msb,
  input  addr_t    base_k,
  input  addr_t    base_b,
  input  addr_t    base_c,
  input  addr_t    base_d,
  input  addr_t    base_int,
  output logic     busy,
  output logic     done,
  output logic     embed_fail,
  output logic [2:0] embed_count,
  // addition sequencer
  output logic     seq_start,
  output seq_cmd_t seq_cmd,
  input  logic     seq_done,
  input  logic     seq_gamma_nz,
  // RAM read port for the bits of b
  output addr_t    mem_addr,
  input  logic [W-1:0] mem_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_RDBIT, S_ISSUE, S_WAIT, S_DONE} state_e;
  typedef enum logic [2:0] {P_CONV, P_DBL0, P_OP1, P_OP2, P_FINAL} phase_e;

  state_e       state;
  phase_e       phase;
  logic         lad, bit_q, csrc_b;
  logic [AW-1:0] idx;               // bits still to process: idx-1 .. 0
  logic [2:0]   n_embed;

  function automatic seq_cmd_t mk(input addr_t a, input addr_t b, input addr_t d,
                                  input logic az, input logic bs);
    seq_cmd_t r;
    r.alg1     = 1'b0;
    r.b_signed = bs;
    r.a_zero   = az;
    r.a_base   = a;
    r.b_base   = b;
    r.d_base   = d;
    return r;
  endfunction

  addr_t c_src;
  assign c_src = csrc_b ? base_b : base_c;

  logic [AW-1:0]          nxt;      // position of the next bit of b
  logic [$clog2(W)-1:0]   bpos;
  assign nxt  = idx - 1'b1;
  assign bpos = $clog2(W)'(nxt % AW'(W));

  // the addition for the current phase
  always_comb begin
    seq_cmd = '0;
    unique case (phase)
      P_CONV:  seq_cmd = mk(base_k, base_k, lad ? base_c : base_b, 1'b1, 1'b1);
      P_DBL0:  seq_cmd = mk(base_c, base_c, base_d, 1'b0, 1'b0);
      P_OP1: begin
        if (!lad)        seq_cmd = mk(c_src,  c_src,  base_c, 1'b0, 1'b0);
        else if (!bit_q) seq_cmd = mk(base_d, base_c, base_d, 1'b0, 1'b0);
        else             seq_cmd = mk(base_c, base_d, base_c, 1'b0, 1'b0);
      end
      P_OP2: begin
        if (!lad)        seq_cmd = mk(base_c, base_b, base_c, 1'b0, 1'b0);
        else if (!bit_q) seq_cmd = mk(base_c, base_c, base_c, 1'b0, 1'b0);
        else             seq_cmd = mk(base_d, base_d, base_d, 1'b0, 1'b0);
      end
      P_FINAL: seq_cmd = mk(c_src, c_src, base_c, 1'b1, 1'b0);
      default: seq_cmd = '0;
    endcase
  end

  assign seq_start = (state == S_ISSUE);
  assign mem_addr  = base_int + addr_t'(nxt / AW'(W));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      phase      <= P_CONV;
      lad        <= 1'b0;
      bit_q      <= 1'b0;
      csrc_b     <= 1'b0;
      idx        <= '0;
      n_embed    <= '0;
      embed_fail <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          lad        <= ladder;
          csrc_b     <= !ladder;
          idx        <= b_msb;
          n_embed    <= '0;
          embed_fail <= 1'b0;
          phase      <= P_CONV;
          state      <= S_ISSUE;
        end
        S_RDBIT: begin
          bit_q <= mem_rdata[bpos];
          idx   <= idx - 1'b1;
          phase <= P_OP1;
          state <= S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (seq_done) begin
          state <= S_ISSUE;
          unique case (phase)
            P_CONV: begin
              if (lad)           phase <= P_DBL0;
              else if (idx != 0) state <= S_RDBIT;
              else               phase <= P_FINAL;
            end
            P_DBL0: begin
              if (idx != 0) state <= S_RDBIT;
              else          phase <= P_FINAL;
            end
            P_OP1: begin
              if (!lad) csrc_b <= 1'b0;
              if (lad || bit_q) phase <= P_OP2;
              else if (idx != 0) state <= S_RDBIT;
              else phase <= P_FINAL;
            end
            P_OP2: begin
              if (idx != 0) state <= S_RDBIT;
              else          phase <= P_FINAL;
            end
            P_FINAL: begin
              csrc_b  <= 1'b0;
              n_embed <= n_embed + 1'b1;
              if (!seq_gamma_nz) begin
                state <= S_DONE;
              end else if (32'(n_embed) + 1 >= MAX_EMBED) begin
                embed_fail <= 1'b1;
                state      <= S_DONE;
              end
            end
            default: state <= S_DONE;
          endcase
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy        = (state != S_IDLE);
  assign done        = (state == S_DONE);
  assign embed_count = n_embed;
endmodule
