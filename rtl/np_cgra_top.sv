// np_cgra_top: the NP-CGRA, a CGRA specialised for depthwise separable
// convolution.
//
// An 8x8 array of PEs runs in lock step, one context per cycle from the
// configuration memory. Each PE row shares an H-bus fed from H-MEM through
// its memory access unit (MAU) and the H crossbar; each PE column shares a
// V-bus fed from its own V-MEM bank. The AGU of every MAU streams addresses
// computed from the controller's tile iterators, so no PE cycle is spent on
// address arithmetic. The GRF broadcasts one depthwise weight to all PEs.
// PEs compute A*B+C in one cycle in MAC mode, and hand operands to their
// neighbours through the operand reuse network.
//
// Pipeline: in cycle t the controller presents the iterators of step t to
// the AGUs, the AGUs' read requests go to the banks, and the context of
// step t is read; in cycle t+1 the read data is on the busses and the PEs
// execute the context of step t. Write-back stores are committed in the
// PE cycle with the address the AGU produced one cycle earlier.
//
// Host interface: the configuration memory and the weight buffer have
// plain write ports, the GRF can also be written directly, and every data
// memory bank has a DMA port (second bank port) that may be used while the
// array runs, e.g. to prefetch the next depthwise channel into the other
// half of H-MEM. start/desc/busy/done run one block of tiles.
module np_cgra_top
  import npcgra_pkg::*;
#(
  parameter int unsigned R         = NR,
  parameter int unsigned C         = NC,
  parameter int unsigned AW        = NA,
  parameter int unsigned DEPTH     = MEM_DEPTH,
  parameter int unsigned NCTX      = CTX_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          mac_mode,
  // kernel control
  input  logic                          start,
  input  kernel_desc_t                  desc,
  output logic                          busy,
  output logic                          done,
  // configuration memory write port
  input  logic                          cfg_we,
  input  logic [$clog2(NCTX)-1:0]       cfg_waddr,
  input  logic [GLOB_W+INSTR_W*R*C-1:0] cfg_wdata,
  // weight buffer write port
  input  logic                          wb_we,
  input  logic [$clog2(WB_DEPTH)-1:0]   wb_waddr,
  input  logic [GRF_N*WORD_W-1:0]       wb_wdata,
  // direct GRF fill
  input  logic                          grf_ext_we,
  input  logic [GRF_N*WORD_W-1:0]       grf_ext_wdata,
  // DMA port to the data memories
  input  logic                          dma_en,
  input  logic                          dma_we,
  input  logic                          dma_vmem,   // 0: H-MEM, 1: V-MEM
  input  logic [$clog2(R)-1:0]          dma_bank,
  input  logic [AW-1:0]                 dma_addr,
  input  logic [WORD_W-1:0]             dma_wdata,
  output logic [WORD_W-1:0]             dma_rdata
);
  localparam int unsigned CW  = GLOB_W + INSTR_W*R*C;
  localparam int unsigned RBW = $clog2(R);
  localparam int unsigned CBW = $clog2(C);

  // ---------------- controller, configuration, GRF ----------------
  agu_ctrl_t                   actl;
  logic                        ctx_re, wb_re, grf_we_ctl;
  logic [$clog2(NCTX)-1:0]     ctx_raddr;
  logic [$clog2(WB_DEPTH)-1:0] wb_raddr;
  logic [CW-1:0]               ctx;
  logic [GRF_N*WORD_W-1:0]     wb_rdata;
  glob_cfg_t                   glob;
  pe_instr_t                   instr [R][C];
  logic [WORD_W-1:0]           grf_data;

  cgra_controller #(.R(R), .C(C), .CTX_AW($clog2(NCTX))) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .desc(desc), .busy(busy), .done(done),
    .agu_ctrl(actl), .ctx_re(ctx_re), .ctx_raddr(ctx_raddr),
    .wb_re(wb_re), .wb_raddr(wb_raddr), .grf_we(grf_we_ctl)
  );

  config_memory #(.DEPTH(NCTX), .WIDTH(CW)) u_cfg (
    .clk(clk), .rst_n(rst_n), .we(cfg_we), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .re(ctx_re), .raddr(ctx_raddr), .rdata(ctx)
  );

  weight_buffer u_wbuf (
    .clk(clk), .we(wb_we), .waddr(wb_waddr), .wdata(wb_wdata),
    .re(wb_re), .raddr(wb_raddr), .rdata(wb_rdata)
  );

  assign glob = glob_cfg_t'(ctx[CW-1 -: GLOB_W]);
  for (genvar r = 0; r < R; r++) begin : g_ir
    for (genvar c = 0; c < C; c++) begin : g_ic
      assign instr[r][c] = pe_instr_t'(ctx[(r*C+c)*INSTR_W +: INSTR_W]);
    end
  end

  grf u_grf (
    .clk(clk), .rst_n(rst_n), .we(grf_we_ctl | grf_ext_we),
    .wdata(grf_we_ctl ? wb_rdata : grf_ext_wdata), .idx(glob.grf_idx), .rdata(grf_data)
  );

  // ---------------- PE array ----------------
  logic [WORD_W-1:0] h_bus [R];
  logic [WORD_W-1:0] v_bus [C];
  logic [WORD_W-1:0] out_reg [R][C];
  logic              row_db [R], row_ab [R];
  logic [WORD_W-1:0] row_db_data [R], row_ab_addr [R];

  pe_array #(.R(R), .C(C)) u_array (
    .clk(clk), .rst_n(rst_n), .mac_mode(mac_mode), .instr(instr),
    .h_bus(h_bus), .v_bus(v_bus), .grf_data(grf_data), .out_reg(out_reg),
    .row_db(row_db), .row_db_data(row_db_data), .row_ab(row_ab), .row_ab_addr(row_ab_addr)
  );

  // ---------------- H side: AGUs, MAUs, crossbar, H-MEM ----------------
  logic              hreq_valid [R], hreq_we [R];
  logic [RBW+AW-1:0] hreq_addr  [R];
  logic [WORD_W-1:0] hreq_wdata [R], hx_rdata [R];
  logic              hb_en [R], hb_we [R];
  logic [AW-1:0]     hb_addr [R];
  logic [WORD_W-1:0] hb_wdata [R], hb_rdata [R], hb_dma_rdata [R];

  for (genvar r = 0; r < R; r++) begin : g_h
    logic              agu_valid, agu_store;
    logic [RBW+AW-1:0] agu_addr;

    h_agu #(.R(R), .C(C), .AW(AW)) u_agu (
      .aid(RBW'(r)), .ctrl(actl), .valid(agu_valid), .is_store(agu_store), .addr(agu_addr)
    );

    mau #(.ADDR_W(RBW+AW)) u_mau (
      .clk(clk), .rst_n(rst_n),
      .agu_valid(agu_valid), .agu_store(agu_store), .agu_addr(agu_addr),
      .st_en(glob.h_st), .db(row_db[r]), .db_data(row_db_data[r]),
      .ab(row_ab[r]), .ab_addr(row_ab_addr[r]), .ld_en(glob.h_ld),
      .req_valid(hreq_valid[r]), .req_we(hreq_we[r]), .req_addr(hreq_addr[r]),
      .req_wdata(hreq_wdata[r]), .mem_rdata(hx_rdata[r]), .bus(h_bus[r])
    );

    mem_bank #(.DEPTH(DEPTH), .AW(AW)) u_bank (
      .clk(clk),
      .a_en(hb_en[r]), .a_we(hb_we[r]), .a_addr(hb_addr[r]), .a_wdata(hb_wdata[r]),
      .a_rdata(hb_rdata[r]),
      .b_en(dma_en && !dma_vmem && dma_bank == RBW'(r)), .b_we(dma_we), .b_addr(dma_addr),
      .b_wdata(dma_wdata), .b_rdata(hb_dma_rdata[r])
    );
  end

  mem_crossbar #(.N(R), .AW(AW)) u_xbar (
    .clk(clk), .rst_n(rst_n),
    .req_valid(hreq_valid), .req_we(hreq_we), .req_addr(hreq_addr), .req_wdata(hreq_wdata),
    .rdata(hx_rdata),
    .bank_en(hb_en), .bank_we(hb_we), .bank_addr(hb_addr), .bank_wdata(hb_wdata),
    .bank_rdata(hb_rdata)
  );

  // ---------------- V side: AGUs, MAUs, V-MEM (one bank per column) -------
  logic [WORD_W-1:0] vb_dma_rdata [C];

  for (genvar c = 0; c < C; c++) begin : g_v
    logic              agu_valid, req_valid, req_we;
    logic [CBW+AW-1:0] agu_addr, req_addr;
    logic [WORD_W-1:0] req_wdata, rdata;

    v_agu #(.C(C), .AW(AW)) u_agu (
      .aid(CBW'(c)), .ctrl(actl), .valid(agu_valid), .addr(agu_addr)
    );

    mau #(.ADDR_W(CBW+AW)) u_mau (
      .clk(clk), .rst_n(rst_n),
      .agu_valid(agu_valid), .agu_store(1'b0), .agu_addr(agu_addr),
      .st_en(1'b0), .db(1'b0), .db_data('0), .ab(1'b0), .ab_addr('0), .ld_en(glob.v_ld),
      .req_valid(req_valid), .req_we(req_we), .req_addr(req_addr), .req_wdata(req_wdata),
      .mem_rdata(rdata), .bus(v_bus[c])
    );

    mem_bank #(.DEPTH(DEPTH), .AW(AW)) u_bank (
      .clk(clk),
      .a_en(req_valid), .a_we(req_we), .a_addr(req_addr[AW-1:0]), .a_wdata(req_wdata),
      .a_rdata(rdata),
      .b_en(dma_en && dma_vmem && dma_bank == RBW'(c)), .b_we(dma_we), .b_addr(dma_addr),
      .b_wdata(dma_wdata), .b_rdata(vb_dma_rdata[c])
    );
  end

  // DMA read data: registered select of the bank read in the previous cycle.
  logic           dma_vmem_q;
  logic [RBW-1:0] dma_bank_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dma_vmem_q <= 1'b0;
      dma_bank_q <= '0;
    end else if (dma_en && !dma_we) begin
      dma_vmem_q <= dma_vmem;
      dma_bank_q <= dma_bank;
    end
  end
  assign dma_rdata = dma_vmem_q ? vb_dma_rdata[CBW'(dma_bank_q)] : hb_dma_rdata[dma_bank_q];
endmodule
