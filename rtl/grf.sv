// grf: global register file of the NP-CGRA.
//
// Nine 16-bit registers (one 3x3 depthwise kernel) with a 4-bit read index
// and a 16-bit read port that is broadcast to every PE through MUX B, and
// a 144-bit write port that loads all nine registers at once from the
// weight buffer. Single-ported as published: a write and a read in the
// same cycle see the old contents on the read port.
//
// Timing: rdata is combinational from idx (the index comes from the
// current context); a write takes effect at the clock edge. An index of 9
// or more reads zero. Reset clears the registers.
module grf
  import npcgra_pkg::*;
#(
  parameter int unsigned NENT = GRF_N,
  parameter int unsigned W    = WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [NENT*W-1:0] wdata,   // register i in bits [i*W +: W]
  input  logic [3:0]        idx,
  output logic [W-1:0]      rdata
);
  logic [W-1:0] regs [NENT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NENT; i++) regs[i] <= '0;
    end else if (we) begin
      for (int i = 0; i < NENT; i++) regs[i] <= wdata[i*W +: W];
    end
  end

  always_comb begin
    rdata = '0;
    for (int i = 0; i < NENT; i++)
      if (idx == 4'(i)) rdata = regs[i];
  end
endmodule
