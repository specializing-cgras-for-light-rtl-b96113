// tb_pe: checks one PE: MAC accumulation from the H- and V-bus (output
// stationary), GRF operand through MUX B, the operand reuse path (neighbour
// OutA written into a local register and read back through MUX A), OutA,
// MUL/ALU mode, immediates and the AB/DB flags.
module tb_pe;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, mac_mode = 1;
  always #5 clk = ~clk;
  pe_instr_t instr;
  logic [15:0] h_bus, v_bus, grf_data, out_reg, out_a;
  logic [15:0] nbr_out [4], nbr_opa [4];
  logic ab, db;

  pe dut (.clk, .rst_n, .mac_mode, .instr, .h_bus, .v_bus, .grf_data, .nbr_out, .nbr_opa,
          .out_reg, .out_a, .ab, .db);

  task automatic chk(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (2000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] acc, hv [4], xs [8], ws [8];
    instr = '0; h_bus = 0; v_bus = 0; grf_data = 0;
    for (int i = 0; i < 4; i++) begin nbr_out[i] = 16'(100 + i); nbr_opa[i] = 16'(200 + i); end
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // 1. MAC chain H*V over 8 cycles
    acc = 0;
    for (int t = 0; t < 8; t++) begin
      xs[t] = 16'($urandom_range(0, 200)); ws[t] = 16'($urandom_range(0, 200));
      instr = '0; instr.op = OP_MAC; instr.src_a = SA_HBUS; instr.src_b = SB_VBUS;
      h_bus = xs[t]; v_bus = ws[t];
      #1 chk(out_a, xs[t], "OutA follows MUX A");
      @(negedge clk); acc = acc + xs[t] * ws[t];
    end
    chk(out_reg, acc, "MAC accumulation");
    // 2. GRF operand: MAC with B from GRF
    instr.src_b = SB_GRF; grf_data = 16'd7; h_bus = 16'd3; @(negedge clk);
    chk(out_reg, 16'(acc + 21), "GRF operand");
    // 3. operand reuse: take east OutA into r0, west OutA into r2
    instr = '0; instr.wr_en = 1; instr.wr_reg = 2'd0; instr.wr_src = 1; instr.in_opnd = DIR_E;
    @(negedge clk);
    instr.wr_reg = 2'd2; instr.in_opnd = DIR_W; @(negedge clk);
    instr = '0; instr.src_a = SA_REG; instr.reg_a = 2'd0; #1 chk(out_a, 16'd202, "reuse from east");
    instr.reg_a = 2'd2; #1 chk(out_a, 16'd203, "reuse from west");
    // result write into register (WrSrc = 0)
    instr = '0; instr.op = OP_PASS; instr.src_a = SA_IMM; instr.imm = 14'h3ffb; // -5
    instr.wr_en = 1; instr.wr_reg = 2'd1; @(negedge clk);
    chk(out_reg, 16'hfffb, "immediate, sign extended");
    instr = '0; instr.src_a = SA_REG; instr.reg_a = 2'd1; #1 chk(out_a, 16'hfffb, "result into register");
    // 4. neighbour OutReg through MUX B, MUL
    instr = '0; instr.op = OP_MUL; instr.src_a = SA_N; instr.src_b = SB_S; @(negedge clk);
    chk(out_reg, 16'(100 * 101), "MUL of neighbours");
    // 5. MUL/ALU mode: MAC gives the product only
    mac_mode = 0; instr = '0; instr.op = OP_MAC; instr.src_a = SA_E; instr.src_b = SB_W; @(negedge clk);
    chk(out_reg, 16'(102 * 103), "MUL/ALU mode");
    mac_mode = 1; @(negedge clk);
    chk(out_reg, 16'(102 * 103 + 102 * 103), "MAC mode again");
    // 6. NOP keeps OutReg, CLR clears, flags pass
    instr = '0; instr.ab = 1; instr.db = 1; @(negedge clk);
    chk(out_reg, 16'(2 * 102 * 103), "NOP holds");
    checks++; if (!(ab && db)) failures++;
    instr = '0; instr.op = OP_CLR; @(negedge clk);
    chk(out_reg, 16'd0, "CLR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
