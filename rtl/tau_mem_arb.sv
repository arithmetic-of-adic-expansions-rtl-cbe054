// tau_mem_arb: selects which unit drives the RAM of the tau-adic arithmetic
// unit.
//
// Three units share the word RAM: the addition sequencer (read/write, plus the
// second read port of a dual-port RAM), the multiplication controller (reads
// the bits of the integer multiplier) and the host (loads operands, reads
// results).  The sequencer has priority while it is busy, then the
// multiplication controller, and the host owns the RAM only when the unit is
// idle; host writes issued while the unit is busy are dropped.  Purely
// combinational.  The document only states that the datapath works next to
// a RAM; this fixed-priority selection is this design's choice.
module tau_mem_arb
  import tau_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic          seq_busy,
  input  logic          seq_we,
  input  addr_t         seq_addr0,
  input  logic [W-1:0]  seq_wdata,
  input  addr_t         seq_addr1,
  input  logic          mul_busy,
  input  addr_t         mul_addr,
  input  logic          host_we,
  input  addr_t         host_addr,
  input  logic [W-1:0]  host_wdata,
  output logic          ram_we,
  output addr_t         ram_addr0,
  output logic [W-1:0]  ram_wdata,
  output addr_t         ram_addr1,
  output logic          host_ready
);
  always_comb begin
    ram_addr1  = seq_addr1;
    host_ready = 1'b0;
    if (seq_busy) begin
      ram_we    = seq_we;
      ram_addr0 = seq_addr0;
      ram_wdata = seq_wdata;
    end else if (mul_busy) begin
      ram_we    = 1'b0;
      ram_addr0 = mul_addr;
      ram_wdata = '0;
    end else begin
      ram_we     = host_we;
      ram_addr0  = host_addr;
      ram_wdata  = host_wdata;
      host_ready = 1'b1;
    end
  end
endmodule
