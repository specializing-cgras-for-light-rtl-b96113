// tb_np_cgra_top: end-to-end test of the NP-CGRA at its default size (8x8).
//
// The testbench plays host and DMA: it writes context programs, fills the
// data memories in the documented layouts and reads the results back
// through the DMA port. Scenarios:
//  1. PWC (1x1 convolution = matrix product), 2x2 tiles, N_i = 24, MAC mode.
//  2. DWC with stride 2, K = 3, one 8x8 output tile.
//  3. DWC with stride 1, K = 3, 1x2 tiles, weights broadcast from the GRF
//     (refilled from the weight buffer), operands passed between PEs by the
//     operand reuse network; channel 1 is loaded by DMA into the other half
//     of H-MEM while channel 0 computes (cross-channel prefetch), then run.
//  4. The same PWC program in MUL/ALU mode, where MAC degrades to MUL, so
//     each output holds only the last product.
//  5. Addressed loads: every row builds a {bank, offset} address with ALU
//     operations, sends it over its H-bus (AB bit) through the crossbar to
//     another bank and passes the returned word to its neighbour.
// Every output is compared with a reference computed here; every block's
// latency is compared with the tile-latency formulas (lambda = N_c + 1).
// Each mechanism is counted and must occur at least once.
module tb_np_cgra_top;
  import npcgra_pkg::*;
  import tb_layout_pkg::*;
  localparam int R = NR, C = NC;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;

  logic mac_mode, start, busy, done, cfg_we, wb_we, grf_ext_we, dma_en, dma_we, dma_vmem;
  kernel_desc_t desc;
  logic [4:0] cfg_waddr; logic [CTX_W-1:0] cfg_wdata;
  logic [5:0] wb_waddr; logic [143:0] wb_wdata, grf_ext_wdata;
  logic [2:0] dma_bank; logic [11:0] dma_addr; logic [15:0] dma_wdata, dma_rdata;

  np_cgra_top dut (.clk, .rst_n, .mac_mode, .start, .desc, .busy, .done, .cfg_we, .cfg_waddr, .cfg_wdata,
                   .wb_we, .wb_waddr, .wb_wdata, .grf_ext_we, .grf_ext_wdata, .dma_en, .dma_we, .dma_vmem,
                   .dma_bank, .dma_addr, .dma_wdata, .dma_rdata);

  // ---------------- mechanism counters ----------------
  int n_mac, n_mulalu, n_reuse, n_grf, n_xbar, n_vss, n_store, n_dma_busy, n_refill, n_ab;
  always @(posedge clk) if (rst_n) begin
    if (dut.instr[0][0].op == OP_MAC && mac_mode)  n_mac++;
    if (dut.instr[0][0].op == OP_MAC && !mac_mode) n_mulalu++;
    if (dut.instr[1][1].wr_en && dut.instr[1][1].wr_src) n_reuse++;
    if (dut.instr[1][1].op != OP_NOP && dut.instr[1][1].src_b == SB_GRF) n_grf++;
    if (dut.hreq_valid[0] && dut.hreq_addr[0][14:12] != 3'd0) n_xbar++;
    if (dut.glob.v_ld && dut.instr[R-1][0].src_a == SA_VBUS) n_vss++;
    if (dut.hb_we[0]) n_store++;
    if (dma_en && dma_we && busy) n_dma_busy++;
    if (dut.u_ctrl.grf_we) n_refill++;
    if (dut.instr[0][0].ab) n_ab++;
  end

  // ---------------- host helpers ----------------
  pe_instr_t prog [R][C];
  glob_cfg_t pglob;

  task automatic prog_clear();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) prog[r][c] = nop();
    pglob = '0;
  endtask
  task automatic cfg_write(int idx);
    @(negedge clk);
    cfg_we = 1; cfg_waddr = 5'(idx);
    cfg_wdata[CTX_W-1 -: GLOB_W] = pglob;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) cfg_wdata[(r*C+c)*INSTR_W +: INSTR_W] = prog[r][c];
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic dma_write(bit v, loc_t l, logic [15:0] d);
    dma_en = 1; dma_we = 1; dma_vmem = v; dma_bank = 3'(l.bank); dma_addr = 12'(l.offs); dma_wdata = d;
    @(negedge clk); dma_en = 0; dma_we = 0;
  endtask
  task automatic dma_read(bit v, loc_t l, output logic [15:0] d);
    dma_en = 1; dma_we = 0; dma_vmem = v; dma_bank = 3'(l.bank); dma_addr = 12'(l.offs);
    @(negedge clk); dma_en = 0; d = dma_rdata;
  endtask
  task automatic run(kernel_desc_t kd, int exp_cycles, string what);
    int cyc;
    desc = kd; start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (cyc != exp_cycles) begin failures++; $display("FAIL %s latency %0d, expected %0d", what, cyc, exp_cycles); end
    else $display("%s: %0d cycles", what, cyc);
  endtask

  task automatic write_back_contexts_at(int first);
    for (int j = 0; j < C; j++) begin
      prog_clear(); for (int r = 0; r < R; r++) prog[r][j] = wb(); pglob.h_st = 1; cfg_write(first + j);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- scenarios ----------------
  localparam int PNI = 24, PBR = 2, PBC = 2;
  logic [15:0] X [PBR*R][PNI], Wt [PNI][PBC*C];
  localparam int K = 3;
  logic [15:0] G [2*R+K][2*C+K], GW [K][K];           // DWC S = 2 input / weights
  logic [15:0] Y [2][R+K][2*C+K], YW [2][K][K];       // DWC S = 1, two channels

  task automatic load_s1_channel(int ch, int aifm, int avin);
    for (int rr = 0; rr < R + K - 1; rr++) for (int cc = 0; cc < 2*C + K - 1; cc++)
      dma_write(0, s1_ifm(rr, cc, K, 2, aifm, R, C), Y[ch][rr][cc]);
    for (int tc = 0; tc < 2; tc++) for (int i = 1; i < K; i++) for (int c = 0; c < C; c++)
      dma_write(1, s1_vmem(0, tc, i, c, K, 2, avin), Y[ch][R - 1 + i][tc*C + c + ((i % 2 == 1) ? K - 1 : 0)]);
  endtask

  task automatic check_s1_channel(int ch, int aofm);
    logic [15:0] got, e;
    for (int y = 0; y < R; y++) for (int x = 0; x < 2*C; x++) begin
      e = 0;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) e += YW[ch][i][j] * Y[ch][y+i][x+j];
      dma_read(0, ofm(y, x, 2, aofm, R, C), got);
      checks++; if (got !== e) begin failures++; if (failures < 20) $display("FAIL s1 ch%0d y%0d x%0d got %0d exp %0d", ch, y, x, got, e); end
    end
  endtask

  initial begin
    kernel_desc_t kd; logic [15:0] got, e;
    {n_mac, n_mulalu, n_reuse, n_grf, n_xbar, n_vss, n_store, n_dma_busy, n_refill, n_ab} = '0;
    mac_mode = 1; start = 0; desc = '0; cfg_we = 0; wb_we = 0; grf_ext_we = 0; dma_en = 0; dma_we = 0;
    dma_vmem = 0; cfg_waddr = 0; cfg_wdata = '0; wb_waddr = 0; wb_wdata = '0; grf_ext_wdata = '0;
    dma_bank = 0; dma_addr = 0; dma_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);

    // ===== 1. PWC =====
    for (int w = 0; w < PBR*R; w++) for (int i = 0; i < PNI; i++) X[w][i] = 16'($urandom_range(0, 300)) - 16'd150;
    for (int i = 0; i < PNI; i++) for (int o = 0; o < PBC*C; o++) Wt[i][o] = 16'($urandom_range(0, 60)) - 16'd30;
    for (int w = 0; w < PBR*R; w++) for (int i = 0; i < PNI; i++) dma_write(0, pwc_ifm(w, i, PNI, 0, R), X[w][i]);
    for (int i = 0; i < PNI; i++) for (int o = 0; o < PBC*C; o++) dma_write(1, pwc_wgt(o, i, PNI, C), Wt[i][o]);
    prog_clear();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) prog[r][c] = mac(SA_HBUS, SB_VBUS);
    pglob.h_ld = 1; pglob.v_ld = 1; cfg_write(0);
    for (int j = 0; j < C; j++) begin
      prog_clear(); for (int r = 0; r < R; r++) prog[r][j] = wb(); pglob.h_st = 1; cfg_write(1 + j);
    end
    kd = '0; kd.mode = MODE_PWC; kd.ni = 12'(PNI); kd.k = 4'd1; kd.s = 3'd1; kd.br = 6'(PBR); kd.bc = 6'(PBC);
    kd.addr_ifm = 12'd0; kd.addr_ofm = 12'd1000;
    run(kd, 1 + PBR*PBC*(PNI + C + 1), "PWC");
    for (int w = 0; w < PBR*R; w++) for (int o = 0; o < PBC*C; o++) begin
      e = 0; for (int i = 0; i < PNI; i++) e += X[w][i] * Wt[i][o];
      dma_read(0, ofm(w, o, PBC, 1000, R, C), got);
      checks++; if (got !== e) begin failures++; if (failures < 20) $display("FAIL pwc w%0d o%0d got %0d exp %0d", w, o, got, e); end
    end

    // ===== 2. DWC, S = 2 =====
    begin
      int s, wl; s = 2; wl = (C - 1) * s + K;
      for (int rr = 0; rr < (R-1)*s + K; rr++) for (int cc = 0; cc < wl; cc++) begin
        G[rr][cc] = 16'($urandom_range(0, 200)) - 16'd100;
        dma_write(0, gen_ifm(rr, cc, s, K, 1, 0, R, C), G[rr][cc]);
      end
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
        loc_t l;
        GW[i][j] = 16'($urandom_range(0, 20)) - 16'd10;
        for (int c = 0; c < C; c++) begin l.bank = c; l.offs = i*K + j; dma_write(1, l, GW[i][j]); end
      end
      for (int t = 0; t < wl; t++) begin
        prog_clear();
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
          if (t >= c*s && t < c*s + K) prog[r][c] = mac(SA_HBUS, SB_VBUS);
        pglob.h_ld = 1; pglob.v_ld = 1; cfg_write(t);
      end
      for (int j = 0; j < C; j++) begin
        prog_clear(); for (int r = 0; r < R; r++) prog[r][j] = wb(); pglob.h_st = 1; cfg_write(wl + j);
      end
      kd = '0; kd.mode = MODE_DWC_GEN; kd.k = 4'(K); kd.s = 3'(s); kd.br = 6'd1; kd.bc = 6'd1;
      kd.addr_ifm = 12'd0; kd.addr_ofm = 12'd1500;
      run(kd, 1 + K*wl + C + 1, "DWC S=2");
      for (int y = 0; y < R; y++) for (int x = 0; x < C; x++) begin
        e = 0; for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) e += GW[i][j] * G[y*s+i][x*s+j];
        dma_read(0, ofm(y, x, 1, 1500, R, C), got);
        checks++; if (got !== e) begin failures++; if (failures < 20) $display("FAIL dwc2 y%0d x%0d got %0d exp %0d", y, x, got, e); end
      end
    end

    // ===== 3. DWC, S = 1, two channels with prefetch =====
    begin
      int nsteps; nsteps = C - 1 + K*K;
      for (int ch = 0; ch < 2; ch++) begin
        for (int rr = 0; rr < R + K - 1; rr++) for (int cc = 0; cc < 2*C + K - 1; cc++)
          Y[ch][rr][cc] = 16'($urandom_range(0, 200)) - 16'd100;
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
          YW[ch][i][j] = 16'($urandom_range(0, 20)) - 16'd10;
          wb_wdata[(i*K + j)*16 +: 16] = YW[ch][i][j];
        end
        @(negedge clk); wb_we = 1; wb_waddr = 6'(3 + ch); @(negedge clk); wb_we = 0;
      end
      // context program: one context per step
      for (int st = 0; st < nsteps; st++) begin
        int ph, nph, i, j;   // phase: 0 prologue / expand east, 1 shift south, 2 expand west
        i = 0; j = 0;
        if (st < C - 1) ph = 0;
        else begin
          int u, q; u = st - (C - 1); i = u / K; q = u % K;
          if (i == 0) begin ph = 0; j = q; end
          else if (q == 0) begin ph = 1; j = (i % 2 == 1) ? K - 1 : 0; end
          else if (i % 2 == 1) begin ph = 2; j = K - 1 - q; end
          else begin ph = 0; j = q; end
        end
        if (st + 1 < C - 1) nph = 0;
        else begin
          int u, q; u = st + 1 - (C - 1); q = u % K;
          nph = (u / K > 0 && q == 0) ? 1 : ((u / K) % 2 == 1 ? 2 : 0);
        end
        prog_clear();
        for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) begin
          pe_instr_t x; x = nop();
          if (st >= C - 1) begin x.op = OP_MAC; x.src_b = SB_GRF; end
          case (ph)
            0: x.src_a = (c == C - 1) ? SA_HBUS : SA_REG;
            1: x.src_a = (r == R - 1) ? SA_VBUS : SA_REG;
            default: x.src_a = (c == 0) ? SA_HBUS : SA_REG;
          endcase
          prog[r][c] = take(x, nph == 1 ? DIR_S : nph == 2 ? DIR_W : DIR_E);
        end
        pglob.grf_idx = 4'(i*K + j); pglob.h_ld = 1; pglob.v_ld = (ph == 1); cfg_write(st);
      end
      for (int jj = 0; jj < C; jj++) begin
        prog_clear(); for (int r = 0; r < R; r++) prog[r][jj] = wb(); pglob.h_st = 1; cfg_write(nsteps + jj);
      end
      load_s1_channel(0, 0, 0);
      kd = '0; kd.mode = MODE_DWC_S1; kd.k = 4'(K); kd.s = 3'd1; kd.br = 6'd1; kd.bc = 6'd2;
      kd.addr_ifm = 12'd0; kd.addr_vin = 12'd0; kd.addr_ofm = 12'd2000; kd.load_grf = 1; kd.wb_entry = 6'd3;
      // start channel 0 and prefetch channel 1 while it runs
      desc = kd; start = 1; @(negedge clk); start = 0;
      begin
        int cyc; cyc = 1;
        fork
          load_s1_channel(1, 400, 100);
          begin while (!done) begin @(negedge clk); cyc++; end end
        join
        checks++;
        if (cyc < 1 + 2 + 2*(K*K + C - 1 + C + 1)) begin failures++; $display("FAIL S1 ch0 too short %0d", cyc); end
      end
      @(negedge clk);
      check_s1_channel(0, 2000);
      kd.addr_ifm = 12'd400; kd.addr_vin = 12'd100; kd.addr_ofm = 12'd2200; kd.wb_entry = 6'd4;
      run(kd, 1 + 2 + 2*(K*K + C - 1 + C + 1), "DWC S=1 channel 1");
      check_s1_channel(1, 2200);
    end

    // ===== 4. PWC in MUL/ALU mode: each output keeps only the last product =====
    mac_mode = 0;
    kd = '0; kd.mode = MODE_PWC; kd.ni = 12'd3; kd.k = 4'd1; kd.s = 3'd1; kd.br = 6'd1; kd.bc = 6'd1;
    for (int w = 0; w < R; w++) for (int i = 0; i < 3; i++) dma_write(0, pwc_ifm(w, i, 3, 0, R), X[w][i]);
    for (int i = 0; i < 3; i++) for (int o = 0; o < C; o++) dma_write(1, pwc_wgt(o, i, 3, C), Wt[i][o]);
    prog_clear();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) prog[r][c] = mac(SA_HBUS, SB_VBUS);
    pglob.h_ld = 1; pglob.v_ld = 1; cfg_write(0);
    for (int j = 0; j < C; j++) begin
      prog_clear(); for (int r = 0; r < R; r++) prog[r][j] = wb(); pglob.h_st = 1; cfg_write(1 + j);
    end
    kd.addr_ofm = 12'd1300;
    run(kd, 1 + (3 + C + 1), "PWC in MUL/ALU mode");
    for (int w = 0; w < R; w++) for (int o = 0; o < C; o++) begin
      e = X[w][2] * Wt[2][o];
      dma_read(0, ofm(w, o, 1, 1300, R, C), got);
      checks++; if (got !== e) begin failures++; if (failures < 20) $display("FAIL mul/alu w%0d o%0d got %0d exp %0d", w, o, got, e); end
    end

    // ===== 5. addressed load (AB): each row computes an address in another bank =====
    // column 0 builds {bank, offset} = ((r+3)%8 << 12) + 2400 + r with ALU
    // operations, offers it on its H-bus (AB), and column 1 takes the word
    // that comes back through the crossbar one step later.
    begin
      logic [15:0] AV [R];
      for (int r = 0; r < R; r++) begin
        loc_t l; l.bank = (r + 3) % R; l.offs = 2400 + r;
        AV[r] = 16'($urandom_range(0, 60000)); dma_write(0, l, AV[r]);
      end
      for (int t = 0; t < C; t++) begin
        prog_clear();
        for (int r = 0; r < R; r++) begin
          pe_instr_t x; x = nop();
          case (t)
            0: begin x.op = OP_PASS; x.src_a = SA_IMM; x.imm = 14'd12; x.wr_en = 1; x.wr_reg = 2'd1; end
            1: begin x.op = OP_SLL; x.src_a = SA_IMM; x.imm = 14'((r + 3) % R); x.src_b = SB_REG; x.reg_b = 2'd1;
                     x.wr_en = 1; x.wr_reg = 2'd2; end
            2: begin x.op = OP_ADD; x.src_a = SA_IMM; x.imm = 14'(2400 + r); x.src_b = SB_REG; x.reg_b = 2'd2; end
            3: x.ab = 1'b1;
            default: ;
          endcase
          prog[r][0] = x;
          if (t == 4) begin x = nop(); x.op = OP_PASS; x.src_a = SA_HBUS; prog[r][1] = x; end
        end
        pglob.h_ld = (t == 4); cfg_write(t);
      end
      write_back_contexts_at(C);
      kd = '0; kd.mode = MODE_DWC_GEN; kd.k = 4'd1; kd.s = 3'd1; kd.br = 6'd1; kd.bc = 6'd1;
      kd.addr_ifm = 12'd0; kd.addr_ofm = 12'd1700;
      run(kd, 1 + C + C + 1, "addressed load");
      for (int r = 0; r < R; r++) begin
        dma_read(0, ofm(r, 0, 1, 1700, R, C), got);
        checks++; if (got !== 16'((((r + 3) % R) << 12) + 2400 + r)) begin failures++; $display("FAIL ab address row %0d got %h", r, got); end
        dma_read(0, ofm(r, 1, 1, 1700, R, C), got);
        checks++; if (got !== AV[r]) begin failures++; $display("FAIL ab data row %0d got %0d exp %0d", r, got, AV[r]); end
      end
    end

    $display("mechanisms: mac=%0d mul_alu=%0d reuse=%0d grf=%0d xbar_rotate=%0d v_ss=%0d stores=%0d dma_during_run=%0d grf_refill=%0d addressed_load=%0d",
             n_mac, n_mulalu, n_reuse, n_grf, n_xbar, n_vss, n_store, n_dma_busy, n_refill, n_ab);
    checks += 10;
    if (n_ab == 0) failures++;
    if (n_mac == 0) failures++;
    if (n_mulalu == 0) failures++;
    if (n_reuse == 0) failures++;
    if (n_grf == 0) failures++;
    if (n_xbar == 0) failures++;
    if (n_vss == 0) failures++;
    if (n_store == 0) failures++;
    if (n_dma_busy == 0) failures++;
    if (n_refill == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
