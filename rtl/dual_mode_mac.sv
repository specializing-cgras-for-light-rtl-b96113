// dual_mode_mac: the arithmetic datapath of one PE.
//
// It holds a multiplier and an ALU. In MAC mode (mac_mode = 1) an OP_MAC
// chains the two: the product A*B is routed into the ALU together with C,
// the PE's OutReg, so the PE computes A*B + C in one cycle. In MUL/ALU mode
// the chaining path is off: each cycle the PE uses either the multiplier
// or the ALU, and an OP_MAC yields only the product. Other operations
// behave the same in both modes. The mode is chosen for a whole
// application, as in the published design, since the chained path is the
// longer one. Arithmetic is 16-bit two's complement and keeps the low 16
// bits of products and sums (the word format is this design's choice).
//
// Purely combinational: result and wr_out are valid in the same cycle as
// the inputs; the PE registers result into OutReg when wr_out is 1.
module dual_mode_mac
  import npcgra_pkg::*;
#(
  parameter int unsigned W = WORD_W
) (
  input  logic         mac_mode,
  input  op_e          op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] result,
  output logic         wr_out
);
  logic [W-1:0] product;
  logic [W-1:0] alu_x, alu_y, alu_out;
  logic         chain;
  op_e          alu_op;

  assign product = W'(a * b);
  assign chain   = mac_mode && (op == OP_MAC);

  // Operand steering into the ALU: in a chained MAC the adder takes the
  // product and OutReg, otherwise it takes A and B directly.
  always_comb begin
    alu_x  = chain ? product : a;
    alu_y  = chain ? c       : b;
    alu_op = chain ? OP_ADD  : op;
  end

  always_comb begin
    unique case (alu_op)
      OP_ADD:  alu_out = alu_x + alu_y;
      OP_SUB:  alu_out = alu_x - alu_y;
      OP_AND:  alu_out = alu_x & alu_y;
      OP_OR:   alu_out = alu_x | alu_y;
      OP_XOR:  alu_out = alu_x ^ alu_y;
      OP_SLL:  alu_out = alu_x << alu_y[3:0];
      OP_SRA:  alu_out = W'($signed(alu_x) >>> alu_y[3:0]);
      OP_MAX:  alu_out = ($signed(alu_x) > $signed(alu_y)) ? alu_x : alu_y;
      OP_PASS: alu_out = alu_x;
      default: alu_out = '0;   // OP_CLR, OP_NOP
    endcase
  end

  always_comb begin
    if (op == OP_MUL || (op == OP_MAC && !mac_mode)) result = product;
    else                                             result = alu_out;
    wr_out = (op != OP_NOP);
  end
endmodule
