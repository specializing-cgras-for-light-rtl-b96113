// tb_dsc_runner: plays the host for a MobileNet V1 style depthwise
// separable block on an R x C NP-CGRA, layer after layer. It is
// instantiated by tb_mobilenet_dsc for each array size under test and
// reports its counts through its ports.
//
// The three layers are the ones that follow the first standard convolution
// in MobileNet V1 (DWC 3x3 S = 1, PWC, DWC 3x3 S = 2), at a reduced image
// size so that the simulation stays short:
//  1. DWC, K = 3, S = 1, 4 channels of 16x16 (zero-padded to 18x18), one
//     block of (16/R)x(16/C) tiles per channel. Weights are broadcast by
//     the GRF, which the controller refills from the weight buffer for even
//     channels and the host writes directly for odd ones; the next channel is written into the
//     other half of H-MEM / V-MEM by DMA while the current one runs
//     (cross-channel prefetch).
//  2. PWC, 4 -> 16 channels on the 16x16 result, one block per image row.
//  3. DWC, K = 3, S = 2, 16 channels of 16x16 (padded by one row and column
//     at the top and left) -> 8x8, weights from V-MEM.
// Between layers the runner reads the results back through the DMA port
// and rewrites them in the layout the next mapping expects; the hardware
// does not re-lay data itself. Every layer's output is compared with a
// reference computed here from the original inputs, and the latency of
// every block with the tile-latency formulas (lambda = N_c + 1).
// The context programs are the same as in the end-to-end test.
// R and C must divide 8 (the S = 2 output size).
module tb_dsc_runner
  import npcgra_pkg::*;
  import tb_layout_pkg::*;
#(
  parameter int R = NR,
  parameter int C = NC
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int K = 3;
  localparam int HW = 16, CH = 4, NO = 16, HO = 8;
  localparam int BW = $clog2(R), CWL = GLOB_W + INSTR_W*R*C;
  localparam int BR1 = HW / R, BC1 = HW / C, BR3 = HO / R, BC3 = HO / C;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;

  logic mac_mode, start, busy, done, cfg_we, wb_we, grf_ext_we, dma_en, dma_we, dma_vmem;
  kernel_desc_t desc;
  logic [4:0] cfg_waddr; logic [CWL-1:0] cfg_wdata;
  logic [5:0] wb_waddr; logic [143:0] wb_wdata, grf_ext_wdata;
  logic [BW-1:0] dma_bank; logic [11:0] dma_addr; logic [15:0] dma_wdata, dma_rdata;

  np_cgra_top #(.R(R), .C(C)) dut (.clk, .rst_n, .mac_mode, .start, .desc, .busy, .done, .cfg_we, .cfg_waddr, .cfg_wdata,
                   .wb_we, .wb_waddr, .wb_wdata, .grf_ext_we, .grf_ext_wdata, .dma_en, .dma_we, .dma_vmem,
                   .dma_bank, .dma_addr, .dma_wdata, .dma_rdata);

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
    cfg_wdata[CWL-1 -: GLOB_W] = pglob;
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) cfg_wdata[(r*C+c)*INSTR_W +: INSTR_W] = prog[r][c];
    @(negedge clk); cfg_we = 0;
  endtask
  task automatic dma_write(bit v, loc_t l, logic [15:0] d);
    dma_en = 1; dma_we = 1; dma_vmem = v; dma_bank = BW'(l.bank); dma_addr = 12'(l.offs); dma_wdata = d;
    @(negedge clk); dma_en = 0; dma_we = 0;
  endtask
  task automatic dma_read(bit v, loc_t l, output logic [15:0] d);
    dma_en = 1; dma_we = 0; dma_vmem = v; dma_bank = BW'(l.bank); dma_addr = 12'(l.offs);
    @(negedge clk); dma_en = 0; d = dma_rdata;
  endtask
  task automatic wait_done(int exp_cycles, string what);
    int cyc; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (cyc != exp_cycles) begin failures++; $display("FAIL %s latency %0d, expected %0d", what, cyc, exp_cycles); end
  endtask
  task automatic write_back_contexts(int first);
    for (int j = 0; j < C; j++) begin
      prog_clear(); for (int r = 0; r < R; r++) prog[r][j] = wb(); pglob.h_st = 1; cfg_write(first + j);
    end
  endtask

  // context programs of the three mappings
  task automatic program_pwc();
    prog_clear();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) prog[r][c] = mac(SA_HBUS, SB_VBUS);
    pglob.h_ld = 1; pglob.v_ld = 1; cfg_write(0);
    write_back_contexts(1);
  endtask
  task automatic program_gen(int s);
    int wl; wl = (C - 1) * s + K;
    for (int t = 0; t < wl; t++) begin
      prog_clear();
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++)
        if (t >= c*s && t < c*s + K) prog[r][c] = mac(SA_HBUS, SB_VBUS);
      pglob.h_ld = 1; pglob.v_ld = 1; cfg_write(t);
    end
    write_back_contexts(wl);
  endtask
  task automatic program_s1();
    int nsteps; nsteps = C - 1 + K*K;
    for (int st = 0; st < nsteps; st++) begin
      int ph, nph, i, j;   // 0 prologue / expand east, 1 shift south, 2 expand west
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
    write_back_contexts(nsteps);
  endtask


  // ---------------- data ----------------
  logic [15:0] X0 [CH][HW+2][HW+2];     // layer 1 input, zero border
  logic [15:0] W1 [CH][K][K];
  logic [15:0] W2 [CH][NO];
  logic [15:0] W3 [NO][K][K];
  logic [15:0] E1 [CH][HW][HW], E2 [NO][HW][HW], E3 [NO][HO][HO];  // references
  logic [15:0] D1 [CH][HW][HW], D2 [NO][HW][HW];                    // hardware results

  function automatic logic [15:0] p2(int o, int y, int x);   // layer 3 input, padded
    return (y == 0 || x == 0) ? 16'd0 : D2[o][y-1][x-1];
  endfunction

  task automatic load_dwc1(int ch);
    int half; half = ch % 2;
    for (int rr = 0; rr < HW + 2; rr++) for (int cc = 0; cc < HW + 2; cc++)
      dma_write(0, s1_ifm(rr, cc, K, BC1, half*200, R, C), X0[ch][rr][cc]);
    for (int tr = 0; tr < BR1; tr++) for (int tc = 0; tc < BC1; tc++)
      for (int i = 1; i < K; i++) for (int c = 0; c < C; c++)
        dma_write(1, s1_vmem(tr, tc, i, c, K, BC1, half*100),
                  X0[ch][tr*R + R - 1 + i][tc*C + c + ((i % 2 == 1) ? K - 1 : 0)]);
  endtask

  initial begin
    kernel_desc_t kd; logic [15:0] got;
    checks = 0; failures = 0; finished = 0;
    mac_mode = 1; start = 0; desc = '0; cfg_we = 0; wb_we = 0; grf_ext_we = 0; dma_en = 0; dma_we = 0;
    dma_vmem = 0; cfg_waddr = 0; cfg_wdata = '0; wb_waddr = 0; wb_wdata = '0; grf_ext_wdata = '0;
    dma_bank = 0; dma_addr = 0; dma_wdata = 0;

    // random network and input, reference computed layer by layer
    for (int ch = 0; ch < CH; ch++) for (int y = 0; y < HW + 2; y++) for (int x = 0; x < HW + 2; x++)
      X0[ch][y][x] = (y == 0 || x == 0 || y == HW + 1 || x == HW + 1) ? 16'd0 : 16'($urandom_range(0, 40)) - 16'd20;
    for (int ch = 0; ch < CH; ch++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) W1[ch][i][j] = 16'($urandom_range(0, 10)) - 16'd5;
    for (int ch = 0; ch < CH; ch++) for (int o = 0; o < NO; o++) W2[ch][o] = 16'($urandom_range(0, 10)) - 16'd5;
    for (int o = 0; o < NO; o++) for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) W3[o][i][j] = 16'($urandom_range(0, 6)) - 16'd3;
    for (int ch = 0; ch < CH; ch++) for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) begin
      E1[ch][y][x] = 0;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) E1[ch][y][x] += W1[ch][i][j] * X0[ch][y+i][x+j];
    end
    for (int o = 0; o < NO; o++) for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) begin
      E2[o][y][x] = 0;
      for (int ch = 0; ch < CH; ch++) E2[o][y][x] += E1[ch][y][x] * W2[ch][o];
    end
    for (int o = 0; o < NO; o++) for (int y = 0; y < HO; y++) for (int x = 0; x < HO; x++) begin
      E3[o][y][x] = 0;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) begin
        int yy, xx; logic [15:0] v;
        yy = 2*y + i - 1; xx = 2*x + j - 1;
        v = (yy < 0 || xx < 0) ? 16'd0 : E2[o][yy][xx];
        E3[o][y][x] += W3[o][i][j] * v;
      end
    end

    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);

    // ===== layer 1: DWC 3x3, S = 1, with cross-channel prefetch =====
    for (int ch = 0; ch < CH; ch++) begin
      wb_wdata = '0;
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) wb_wdata[(i*K + j)*16 +: 16] = W1[ch][i][j];
      @(negedge clk); wb_we = 1; wb_waddr = 6'(ch); @(negedge clk); wb_we = 0;
    end
    program_s1();
    load_dwc1(0);
    for (int ch = 0; ch < CH; ch++) begin
      kd = '0; kd.mode = MODE_DWC_S1; kd.k = 4'(K); kd.s = 3'd1; kd.br = 6'(BR1); kd.bc = 6'(BC1);
      kd.addr_ifm = 12'((ch % 2) * 200); kd.addr_vin = 12'((ch % 2) * 100); kd.addr_ofm = 12'(1000 + ch*100);
      // even channels: the controller refills the GRF from the weight
      // buffer; odd channels: the host writes the GRF directly
      kd.load_grf = (ch % 2 == 0); kd.wb_entry = 6'(ch);
      if (ch % 2 == 1) begin
        for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) grf_ext_wdata[(i*K + j)*16 +: 16] = W1[ch][i][j];
        grf_ext_we = 1; @(negedge clk); grf_ext_we = 0;
      end
      desc = kd; start = 1; @(negedge clk); start = 0;
      if (ch + 1 < CH) begin
        // the prefetch DMA takes longer than the block; time the block alone
        int cyc; bit seen; cyc = 1; seen = 0;
        fork
          load_dwc1(ch + 1);
          begin while (!done) begin @(negedge clk); cyc++; end end
        join
        checks++;
        if (cyc != 1 + (kd.load_grf ? 2 : 0) + BR1*BC1*(K*K + C - 1 + C + 1)) begin
          failures++; $display("FAIL layer 1 channel %0d latency %0d", ch, cyc);
        end
        @(negedge clk);
      end else wait_done(1 + (kd.load_grf ? 2 : 0) + BR1*BC1*(K*K + C - 1 + C + 1), "layer 1");
      for (int y = 0; y < HW; y++) for (int x = 0; x < HW; x++) begin
        dma_read(0, ofm(y, x, BC1, 1000 + ch*100, R, C), got);
        D1[ch][y][x] = got;
        checks++;
        if (got !== E1[ch][y][x]) begin failures++; if (failures < 20) $display("FAIL L1 ch%0d y%0d x%0d got %0d exp %0d", ch, y, x, got, E1[ch][y][x]); end
      end
    end
    $display("%0dx%0d array: layer 1 (DWC S=1, %0d channels of %0dx%0d) done", R, C, CH, HW, HW);

    // ===== layer 2: PWC CH -> NO, one block per image row =====
    program_pwc();
    for (int ch = 0; ch < CH; ch++) for (int o = 0; o < NO; o++) dma_write(1, pwc_wgt(o, ch, CH, C), W2[ch][o]);
    for (int h = 0; h < HW; h++) begin
      for (int w = 0; w < HW; w++) for (int ch = 0; ch < CH; ch++) dma_write(0, pwc_ifm(w, ch, CH, 0, R), D1[ch][h][w]);
      kd = '0; kd.mode = MODE_PWC; kd.ni = 12'(CH); kd.k = 4'd1; kd.s = 3'd1; kd.br = 6'(HW / R); kd.bc = 6'(NO / C);
      kd.addr_ifm = 12'd0; kd.addr_ofm = 12'd100;
      desc = kd; start = 1; @(negedge clk); start = 0;
      wait_done(1 + (HW / R)*(NO / C)*(CH + C + 1), "layer 2");
      for (int w = 0; w < HW; w++) for (int o = 0; o < NO; o++) begin
        dma_read(0, ofm(w, o, NO / C, 100, R, C), got);
        D2[o][h][w] = got;
        checks++;
        if (got !== E2[o][h][w]) begin failures++; if (failures < 20) $display("FAIL L2 o%0d h%0d w%0d got %0d exp %0d", o, h, w, got, E2[o][h][w]); end
      end
    end
    $display("%0dx%0d array: layer 2 (PWC %0d -> %0d) done", R, C, CH, NO);

    // ===== layer 3: DWC 3x3, S = 2, 16x16 -> 8x8 =====
    program_gen(2);
    for (int o = 0; o < NO; o++) begin
      int bw; bw = gen_block_w(2, BC3, K, C);
      for (int rr = 0; rr < 2*HO + 1; rr++) for (int cc = 0; cc < bw; cc++)
        dma_write(0, gen_ifm(rr, cc, 2, K, BC3, 0, R, C), p2(o, rr, cc));
      for (int i = 0; i < K; i++) for (int j = 0; j < K; j++) for (int c = 0; c < C; c++) begin
        loc_t l; l.bank = c; l.offs = i*K + j; dma_write(1, l, W3[o][i][j]);
      end
      kd = '0; kd.mode = MODE_DWC_GEN; kd.k = 4'(K); kd.s = 3'd2; kd.br = 6'(BR3); kd.bc = 6'(BC3);
      kd.addr_ifm = 12'd0; kd.addr_ofm = 12'd1500;
      desc = kd; start = 1; @(negedge clk); start = 0;
      wait_done(1 + BR3*BC3*(K*((C - 1)*2 + K) + C + 1), "layer 3");
      for (int y = 0; y < HO; y++) for (int x = 0; x < HO; x++) begin
        dma_read(0, ofm(y, x, BC3, 1500, R, C), got);
        checks++;
        if (got !== E3[o][y][x]) begin failures++; if (failures < 20) $display("FAIL L3 o%0d y%0d x%0d got %0d exp %0d", o, y, x, got, E3[o][y][x]); end
      end
    end
    $display("%0dx%0d array: layer 3 (DWC S=2, %0d channels -> %0dx%0d) done", R, C, NO, HO, HO);

    finished = 1;
  end
endmodule
