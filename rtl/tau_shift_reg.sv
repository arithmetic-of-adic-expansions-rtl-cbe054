// tau_shift_reg: W-bit operand/result shift register of the word-serial
// tau-adic adder.
//
// The addition unit uses three of these (operand A, operand B, result C; a
// signed operand B uses a fourth for its sign plane).  An operand register is
// loaded in parallel from a RAM word and then shifted right OMEGA bits per
// clock, presenting its OMEGA least significant bits (the next digits, least
// significant first) on 'sout'.  The result register shifts the OMEGA result
// digits in at the top on 'sin', so after W/OMEGA shifts it holds the whole
// result word with digit 0 in bit 0.
//
// Interface: 'load' (priority) copies 'd'; 'shift' shifts by OMEGA.  Both act
// at the rising clock edge.  The document calls for W-bit shift registers;
// the parallel-load/shift-right organisation is this design's choice.
module tau_shift_reg #(
  parameter int unsigned W     = 16,
  parameter int unsigned OMEGA = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [W-1:0]     d,
  input  logic             shift,
  input  logic [OMEGA-1:0] sin,
  output logic [OMEGA-1:0] sout,
  output logic [W-1:0]     q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= (OMEGA == W) ? W'(sin) : {sin, q[W-1:OMEGA]};
  end

  assign sout = q[OMEGA-1:0];
endmodule
