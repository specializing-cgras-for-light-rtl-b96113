// npcgra_pkg: types and constants shared by the NP-CGRA modules.
//
// The array is 8x8 PEs with 16-bit words (the published configuration).
// A context (one configuration-memory entry) is 36 bits per PE plus 8
// global bits: 36*64 + 8 = 2312 bits. The split of the 36 PE bits into
// fields follows the field names of the published instruction format
// (RegA, RegB, WrEn, WrReg, WrSrc, InOpnd, AB, DB); the field widths, the
// opcode encoding and the operand-source encodings are this design's own.
// Each H-MEM / V-MEM set is 39 KB split over 8 banks of 2496 words; bank
// offsets are NA = 12 bits wide and a full bus address is {bank, offset}.
package npcgra_pkg;

  localparam int unsigned WORD_W    = 16;
  localparam int unsigned NR        = 8;
  localparam int unsigned NC        = 8;
  localparam int unsigned NA        = 12;
  localparam int unsigned MEM_DEPTH = 2496;
  localparam int unsigned CTX_DEPTH = 32;
  localparam int unsigned GRF_N     = 9;
  localparam int unsigned WB_DEPTH  = 64;
  localparam int unsigned INSTR_W   = 36;
  localparam int unsigned GLOB_W    = 8;

  typedef logic [WORD_W-1:0] word_t;

  // PE operations. MAC chains multiply and add only when the array is in
  // MAC mode; in MUL/ALU mode a MAC opcode performs the multiply alone.
  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,
    OP_SUB  = 4'd2,
    OP_MUL  = 4'd3,
    OP_MAC  = 4'd4,
    OP_AND  = 4'd5,
    OP_OR   = 4'd6,
    OP_XOR  = 4'd7,
    OP_SLL  = 4'd8,
    OP_SRA  = 4'd9,
    OP_MAX  = 4'd10,
    OP_PASS = 4'd11,
    OP_CLR  = 4'd12
  } op_e;

  // MUX A sources.
  typedef enum logic [2:0] {
    SA_REG = 3'd0, SA_HBUS = 3'd1, SA_VBUS = 3'd2, SA_IMM = 3'd3,
    SA_N   = 3'd4, SA_S    = 3'd5, SA_E    = 3'd6, SA_W   = 3'd7
  } srca_e;

  // MUX B sources (GRF broadcast is reachable only through MUX B).
  typedef enum logic [2:0] {
    SB_REG = 3'd0, SB_HBUS = 3'd1, SB_VBUS = 3'd2, SB_GRF = 3'd3,
    SB_N   = 3'd4, SB_S    = 3'd5, SB_E    = 3'd6, SB_W   = 3'd7
  } srcb_e;

  // Neighbour direction, used by InOpnd and as index of neighbour arrays.
  typedef enum logic [1:0] { DIR_N = 2'd0, DIR_S = 2'd1, DIR_E = 2'd2, DIR_W = 2'd3 } dir_e;

  // 36-bit PE instruction.
  typedef struct packed {
    op_e         op;       // 4
    srca_e       src_a;    // 3
    srcb_e       src_b;    // 3
    logic [1:0]  reg_a;    // RegA
    logic [1:0]  reg_b;    // RegB
    logic        wr_en;    // WrEn
    logic [1:0]  wr_reg;   // WrReg
    logic        wr_src;   // WrSrc: 0 = MAC/ALU result, 1 = neighbour OutA
    dir_e        in_opnd;  // InOpnd: which neighbour's OutA
    logic        ab;       // AB: OutReg is an addressed-read address
    logic        db;       // DB: OutReg is store data
    logic [13:0] imm;      // immediate for MUX A
  } pe_instr_t;

  // 8 global context bits.
  typedef struct packed {
    logic [3:0] grf_idx;   // GRF read index
    logic       h_ld;      // H-bus carries memory read data this cycle
    logic       v_ld;      // V-bus carries memory read data this cycle
    logic       h_st;      // commit the H-MEM store of this cycle
    logic       rsvd;
  } glob_cfg_t;

  localparam int unsigned CTX_W = GLOB_W + INSTR_W*NR*NC;  // 2312

  typedef enum logic [1:0] { MODE_PWC = 2'd0, MODE_DWC_GEN = 2'd1, MODE_DWC_S1 = 2'd2 } mode_e;

  // Kernel descriptor written by the host before start (one block).
  typedef struct packed {
    mode_e       mode;
    logic [11:0] ni;        // N_i (PWC reduction length)
    logic [3:0]  k;         // kernel size K
    logic [2:0]  s;         // stride S
    logic [5:0]  br;        // tiles per block, rows
    logic [5:0]  bc;        // tiles per block, columns
    logic [11:0] addr_ifm;  // H-MEM base of the input block
    logic [11:0] addr_ofm;  // H-MEM base of the output block
    logic [11:0] addr_vin;  // V-MEM base (0 reproduces the published formulas)
    logic        load_grf;  // refill the GRF from the weight buffer first
    logic [5:0]  wb_entry;  // weight-buffer entry to load
  } kernel_desc_t;

  // Iterators broadcast from the controller to every AGU.
  typedef struct packed {
    mode_e       mode;
    logic        load;      // load phase of a tile
    logic        store;     // store (write-back) phase of a tile
    logic [11:0] t_cycle;
    logic [4:0]  t_wrap;
    logic [11:0] t_wcycle;
    logic [5:0]  tid_r;
    logic [5:0]  tid_c;
    logic [11:0] ni;
    logic [3:0]  k;
    logic [2:0]  s;
    logic [5:0]  bc;
    logic [11:0] addr_ifm;
    logic [11:0] addr_ofm;
    logic [11:0] addr_vin;
  } agu_ctrl_t;

endpackage
