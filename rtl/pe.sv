// pe: one NP-CGRA processing element.
//
// Each cycle the PE executes one 36-bit instruction. MUX A picks operand A
// from a local register (RegA), the row's H-bus, the column's V-bus, an
// immediate or a neighbour's OutReg; MUX B picks operand B from a local
// register (RegB), the H-bus, the V-bus, the GRF broadcast or a neighbour.
// The dual-mode MAC computes the result, which is written into OutReg at
// the clock edge (operand C of a MAC is OutReg itself, so a chain of MACs
// accumulates in place, output stationary).
//
// Operand reuse network: OutA, the output of MUX A, goes to the four
// neighbours. With WrSrc = 1 the PE writes the OutA of the neighbour named
// by InOpnd into local register WrReg instead of its own result, so an
// operand used in this cycle is handed to the neighbour for the next cycle
// without disturbing the computation. The local register file has four
// entries. AB marks OutReg as the address of an addressed read and DB marks
// OutReg as store data; the row's memory access unit acts on them.
//
// Timing: OutReg and the register file update on the rising clock edge;
// out_a is combinational from the instruction and the PE's inputs.
// Reset clears OutReg and the register file.
module pe
  import npcgra_pkg::*;
#(
  parameter int unsigned W    = WORD_W,
  parameter int unsigned NREG = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mac_mode,
  input  pe_instr_t    instr,
  input  logic [W-1:0] h_bus,
  input  logic [W-1:0] v_bus,
  input  logic [W-1:0] grf_data,
  input  logic [W-1:0] nbr_out [4],   // neighbour OutReg, indexed by dir_e
  input  logic [W-1:0] nbr_opa [4],   // neighbour OutA, indexed by dir_e
  output logic [W-1:0] out_reg,
  output logic [W-1:0] out_a,
  output logic         ab,
  output logic         db
);
  logic [W-1:0] rf [NREG];
  logic [W-1:0] op_b, result;
  logic         wr_out;

  always_comb begin
    unique case (instr.src_a)
      SA_REG:  out_a = rf[instr.reg_a];
      SA_HBUS: out_a = h_bus;
      SA_VBUS: out_a = v_bus;
      SA_IMM:  out_a = W'($signed(instr.imm));
      SA_N:    out_a = nbr_out[DIR_N];
      SA_S:    out_a = nbr_out[DIR_S];
      SA_E:    out_a = nbr_out[DIR_E];
      default: out_a = nbr_out[DIR_W];
    endcase
    unique case (instr.src_b)
      SB_REG:  op_b = rf[instr.reg_b];
      SB_HBUS: op_b = h_bus;
      SB_VBUS: op_b = v_bus;
      SB_GRF:  op_b = grf_data;
      SB_N:    op_b = nbr_out[DIR_N];
      SB_S:    op_b = nbr_out[DIR_S];
      SB_E:    op_b = nbr_out[DIR_E];
      default: op_b = nbr_out[DIR_W];
    endcase
  end

  dual_mode_mac #(.W(W)) u_mac (
    .mac_mode(mac_mode), .op(instr.op), .a(out_a), .b(op_b), .c(out_reg),
    .result(result), .wr_out(wr_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_reg <= '0;
      for (int i = 0; i < NREG; i++) rf[i] <= '0;
    end else begin
      if (wr_out) out_reg <= result;
      if (instr.wr_en)
        rf[instr.wr_reg] <= instr.wr_src ? nbr_opa[instr.in_opnd] : result;
    end
  end

  assign ab = instr.ab;
  assign db = instr.db;
endmodule
