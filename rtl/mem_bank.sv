// mem_bank: one bank of the on-chip data memory (H-MEM or V-MEM).
//
// Each memory set of the NP-CGRA (H-MEM and V-MEM, 39 KB each) is split
// into 8 banks of DEPTH 16-bit words; one bank serves one H-bus (through
// the crossbar) or one V-bus. The bank has two ports: port A for the
// CGRA's memory access units and port B for the DMA, so the next channel
// can be loaded while the array computes on the current one. Two ports
// are this design's choice; the capacity follows the published size.
// An access at an offset of DEPTH or above reads zero and writes nothing.
// If both ports write the same word in one cycle, port A wins.
//
// Timing: writes take effect at the clock edge; read data appears on
// a_rdata / b_rdata one cycle after the request (registered output).
module mem_bank
  import npcgra_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_DEPTH,
  parameter int unsigned AW    = NA,
  parameter int unsigned W     = WORD_W
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  output logic [W-1:0]  a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [W-1:0]  b_wdata,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];
  logic a_in, b_in;

  assign a_in = (32'(a_addr) < DEPTH);
  assign b_in = (32'(b_addr) < DEPTH);

  always_ff @(posedge clk) begin
    if (b_en && b_we && b_in && !(a_en && a_we && a_in && a_addr == b_addr))
      mem[b_addr] <= b_wdata;
    if (a_en && a_we && a_in)
      mem[a_addr] <= a_wdata;
    if (a_en && !a_we) a_rdata <= a_in ? mem[a_addr] : '0;
    if (b_en && !b_we) b_rdata <= b_in ? mem[b_addr] : '0;
  end
endmodule
