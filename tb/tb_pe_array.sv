// tb_pe_array: drives the 8x8 array directly.
//  1. Output-stationary matrix product: every PE runs MAC with A from its
//     H-bus and B from its V-bus for N cycles; PE (r,c) must end with the
//     dot product of H-stream r and V-stream c.
//  2. Operand reuse network: the east column takes a value from the H-bus,
//     every other PE takes its east neighbour's OutA; after C-1 steps each
//     row holds its stream shifted west. Then one shift south and one
//     shift north are checked, and the GRF broadcast is used as operand B.
//  3. Row store selection: with DB set on one PE of each row the row's
//     store data is that PE's OutReg.
module tb_pe_array;
  import npcgra_pkg::*;
  import tb_layout_pkg::*;
  localparam int R = NR, C = NC;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, mac_mode = 1; always #5 clk = ~clk;
  pe_instr_t instr [R][C];
  logic [15:0] h_bus [R], v_bus [C], grf_data, out_reg [R][C], row_db_data [R], row_ab_addr [R];
  logic row_db [R], row_ab [R];
  pe_array dut (.clk, .rst_n, .mac_mode, .instr, .h_bus, .v_bus, .grf_data, .out_reg,
                .row_db, .row_db_data, .row_ab, .row_ab_addr);

  task automatic all(pe_instr_t x);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) instr[r][c] = x;
  endtask

  initial begin
    repeat (3000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    localparam int N = 12;
    logic [15:0] X [R][N], W [N][C], exp_v, val [R][C];
    all(nop()); grf_data = 0;
    for (int r = 0; r < R; r++) h_bus[r] = 0;
    for (int c = 0; c < C; c++) v_bus[c] = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // 1. matrix product
    for (int r = 0; r < R; r++) for (int i = 0; i < N; i++) X[r][i] = 16'($urandom_range(0, 50));
    for (int i = 0; i < N; i++) for (int c = 0; c < C; c++) W[i][c] = 16'($urandom_range(0, 50));
    all(mac(SA_HBUS, SB_VBUS));
    for (int i = 0; i < N; i++) begin
      for (int r = 0; r < R; r++) h_bus[r] = X[r][i];
      for (int c = 0; c < C; c++) v_bus[c] = W[i][c];
      @(negedge clk);
    end
    all(nop());
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      exp_v = 0; for (int i = 0; i < N; i++) exp_v += X[r][i] * W[i][c];
      checks++; if (out_reg[r][c] !== exp_v) failures++;
    end
    // 3. row store selection
    for (int r = 0; r < R; r++) instr[r][(r + 3) % C] = wb();
    #1;
    for (int r = 0; r < R; r++) begin
      checks++; if (!row_db[r] || row_db_data[r] !== out_reg[r][(r + 3) % C]) failures++;
    end
    @(negedge clk);
    for (int r = 0; r < R; r++) begin checks++; if (out_reg[r][(r + 3) % C] !== 0) failures++; end
    // 2. operand reuse: shift west C-1 steps
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      pe_instr_t x; x = nop();
      x.src_a = (c == C - 1) ? SA_HBUS : SA_REG;
      instr[r][c] = take(x, DIR_E);
    end
    for (int p = 0; p < C - 1; p++) begin
      for (int r = 0; r < R; r++) h_bus[r] = 16'(r * 16 + p + 1);
      @(negedge clk);
    end
    // register 0 of PE (r,c) now holds stream value c  (r*16 + c + 1) for c < C-1
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      pe_instr_t x; x = nop(); x.src_a = SA_REG; x.reg_a = 0; instr[r][c] = x;
    end
    #1;
    for (int r = 0; r < R; r++) for (int c = 0; c < C - 1; c++) begin
      checks++; if (dut.opa[r][c] !== 16'(r * 16 + c + 1)) failures++;
      val[r][c] = 16'(r * 16 + c + 1);
    end
    // shift south: every PE takes the OutA of the PE below it
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) instr[r][c] = take(instr[r][c], DIR_S);
    @(negedge clk);
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) instr[r][c].wr_en = 0;
    #1;
    for (int r = 0; r < R - 1; r++) for (int c = 0; c < C - 1; c++) begin
      checks++; if (dut.opa[r][c] !== val[r + 1][c]) failures++;
    end
    // MUL with the GRF broadcast as B: OutReg = reused A * g
    grf_data = 16'd3;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      instr[r][c].op = OP_MUL; instr[r][c].src_b = SB_GRF;
    end
    @(negedge clk); all(nop());
    for (int r = 0; r < R - 1; r++) for (int c = 0; c < C - 1; c++) begin
      checks++; if (out_reg[r][c] !== 16'(val[r + 1][c] * 3)) failures++;
    end
    // shift west: every PE takes the OutA of its west neighbour
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
      pe_instr_t x; x = nop(); x.src_a = SA_REG; x.reg_a = 0; instr[r][c] = take(x, DIR_W);
    end
    @(negedge clk); all(nop());
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) instr[r][c].src_a = SA_REG;
    #1;
    for (int r = 0; r < R - 1; r++) for (int c = 1; c < C - 1; c++) begin
      checks++; if (dut.opa[r][c] !== val[r + 1][c - 1]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
