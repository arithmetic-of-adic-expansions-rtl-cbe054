// tau_ram: W-bit word memory of the tau-adic arithmetic unit.
//
// Holds the expansions, their remainder words, the accumulators of the
// multiplications and the integer multiplier b.  It is written as a register
// file: reads are asynchronous (data of the addressed word appear in the same
// cycle), writes happen at the rising edge.  Port 0 reads and writes.  With
// DUAL_PORT = 1 a second, read-only port lets the adder fetch both operand
// words in one cycle; with DUAL_PORT = 0 that port is absent and reads 0.
//
// The document assumes a W-bit single- or dual-port RAM next to the ALU; the
// register-file timing (one cycle per word access) is this design's choice
// and matches the per-word cycle counts the document gives.
module tau_ram #(
  parameter int unsigned W         = 16,
  parameter int unsigned DEPTH     = 160,
  parameter int unsigned AW        = 10,
  parameter bit          DUAL_PORT = 1'b0
) (
  input  logic          clk,
  input  logic          we0,
  input  logic [AW-1:0] addr0,
  input  logic [W-1:0]  wdata0,
  output logic [W-1:0]  rdata0,
  input  logic [AW-1:0] addr1,
  output logic [W-1:0]  rdata1
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we0 && (32'(addr0) < DEPTH)) mem[addr0] <= wdata0;
  end

  assign rdata0 = (32'(addr0) < DEPTH) ? mem[addr0] : '0;

  if (DUAL_PORT) begin : g_port1
    assign rdata1 = (32'(addr1) < DEPTH) ? mem[addr1] : '0;
  end else begin : g_no_port1
    assign rdata1 = '0;
  end
endmodule
