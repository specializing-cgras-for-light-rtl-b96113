// config_memory: context memory of the NP-CGRA.
//
// Holds CTX_DEPTH contexts of CTX_W bits: 32 contexts of 2312 bits
// (36 instruction bits for each of the 64 PEs plus 8 global bits), the
// published size. Layout of a context: bits [CTX_W-1 -: 8] are the global
// bits (glob_cfg_t); PE (r,c) owns bits [(r*NC+c)*36 +: 36].
// The host writes one whole context per cycle (the width of the write port
// is this design's choice). The controller reads one context per cycle.
//
// Timing: rdata presents the context addressed by raddr one cycle after
// re = 1; in a cycle after re = 0 it presents the all-zero context, in
// which every PE executes NOP and no global action is taken.
module config_memory
  import npcgra_pkg::*;
#(
  parameter int unsigned DEPTH = CTX_DEPTH,
  parameter int unsigned WIDTH = CTX_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [WIDTH-1:0] rd_q;
  logic             re_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rd_q <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) re_q <= 1'b0;
    else        re_q <= re;
  end

  assign rdata = re_q ? rd_q : '0;
endmodule
