// weight_buffer: small buffer of depthwise-convolution weights.
//
// Holds DEPTH images of the GRF contents (nine 16-bit weights, 144 bits
// each): 64 entries, 1152 bytes, as in the published configuration. The
// host or DMA writes whole entries; the controller reads one entry to
// refill the GRF when a depthwise channel starts. The organisation as
// 64 x 144 bits and the one-cycle registered read are this design's
// choice.
//
// Timing: a write takes effect at the clock edge; rdata holds the entry
// addressed by raddr one cycle after re is 1.
module weight_buffer
  import npcgra_pkg::*;
#(
  parameter int unsigned DEPTH = WB_DEPTH,
  parameter int unsigned WIDTH = GRF_N*WORD_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
