// tb_alexnet_im2col: AlexNet convolution layers run as matrix products on
// the full-size (8x8) NP-CGRA.
//
// A 3-D convolution is turned into a matrix product by im2col on the host:
// every output pixel becomes one row of N_i = C_in*K*K input values, and
// the array runs the PWC mapping on it. This test runs one 8x8 tile (8
// output pixels of one output row, 8 output channels) of two layers:
//  - conv1: 3 input channels, K = 11, S = 4, N_i = 363;
//  - conv3: 256 input channels, K = 3, S = 1 (input padded), N_i = 2304,
//    the largest reduction length of the network. Its 2304 input words plus
//    the 8 output words per bank nearly fill a 2496-word H-MEM bank, and the
//    2304 weights per column nearly fill a V-MEM bank.
// The host (this testbench) builds the im2col rows from a random input
// volume, writes them and the weights through the DMA port, runs one block
// and compares every output with a direct convolution computed here. The
// block latency is checked against N_i + N_c + 1 cycles per tile.
module tb_alexnet_im2col;
  import npcgra_pkg::*;
  import tb_layout_pkg::*;
  localparam int R = NR, C = NC;
  localparam int MAXC = 256, MAXK = 11, MAXW = 7*4 + 11, MAXNI = 2304;
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

  initial begin
    repeat (300000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [15:0] IN [MAXC][MAXK][MAXW];   // input rows y*S .. y*S+K-1 of the layer
  logic [15:0] WT [C][MAXC][MAXK][MAXK];

  // one 8x8 tile of a convolution layer: output pixels x = 0..7, channels 0..7
  task automatic conv_tile(int cin, int k, int s, string name);
    int ni, cyc; logic [15:0] got, e;
    ni = cin * k * k;
    for (int c = 0; c < cin; c++) for (int ky = 0; ky < k; ky++) for (int x = 0; x < (C-1)*s + k; x++)
      IN[c][ky][x] = 16'($urandom_range(0, 30)) - 16'd15;
    for (int o = 0; o < C; o++) for (int c = 0; c < cin; c++) for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++)
      WT[o][c][ky][kx] = 16'($urandom_range(0, 8)) - 16'd4;
    // im2col: row w of the matrix is the receptive field of output pixel w
    for (int w = 0; w < R; w++) for (int c = 0; c < cin; c++) for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++)
      dma_write(0, pwc_ifm(w, (c*k + ky)*k + kx, ni, 0, R), IN[c][ky][w*s + kx]);
    for (int o = 0; o < C; o++) for (int c = 0; c < cin; c++) for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++)
      dma_write(1, pwc_wgt(o, (c*k + ky)*k + kx, ni, C), WT[o][c][ky][kx]);
    desc = '0; desc.mode = MODE_PWC; desc.ni = 12'(ni); desc.k = 4'd1; desc.s = 3'd1; desc.br = 6'd1; desc.bc = 6'd1;
    desc.addr_ifm = 12'd0; desc.addr_ofm = 12'(MAXNI + 100);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    @(negedge clk);
    checks++;
    if (cyc != 1 + ni + C + 1) begin failures++; $display("FAIL %s latency %0d, expected %0d", name, cyc, 1 + ni + C + 1); end
    else $display("%s: N_i = %0d, %0d cycles", name, ni, cyc);
    for (int w = 0; w < R; w++) for (int o = 0; o < C; o++) begin
      e = 0;
      for (int c = 0; c < cin; c++) for (int ky = 0; ky < k; ky++) for (int kx = 0; kx < k; kx++)
        e += WT[o][c][ky][kx] * IN[c][ky][w*s + kx];
      dma_read(0, ofm(w, o, 1, MAXNI + 100, R, C), got);
      checks++;
      if (got !== e) begin failures++; if (failures < 20) $display("FAIL %s pixel %0d channel %0d got %0d exp %0d", name, w, o, got, e); end
    end
  endtask

  initial begin
    mac_mode = 1; start = 0; desc = '0; cfg_we = 0; wb_we = 0; grf_ext_we = 0; dma_en = 0; dma_we = 0;
    dma_vmem = 0; cfg_waddr = 0; cfg_wdata = '0; wb_waddr = 0; wb_wdata = '0; grf_ext_wdata = '0;
    dma_bank = 0; dma_addr = 0; dma_wdata = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(negedge clk);

    // PWC program: MAC every cycle, then write back column by column
    prog_clear();
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) prog[r][c] = mac(SA_HBUS, SB_VBUS);
    pglob.h_ld = 1; pglob.v_ld = 1; cfg_write(0);
    for (int j = 0; j < C; j++) begin
      prog_clear(); for (int r = 0; r < R; r++) prog[r][j] = wb(); pglob.h_st = 1; cfg_write(1 + j);
    end

    conv_tile(3, 11, 4, "conv1");
    conv_tile(256, 3, 1, "conv3");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
