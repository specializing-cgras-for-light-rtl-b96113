// pe_array: the NR x NC mesh of PEs with its busses.
//
// Every PE of row r reads H-bus r and every PE of column c reads V-bus c
// (the crossbar-style memory bus); all PEs read the GRF broadcast. Each PE
// sees the OutReg and the OutA of its four mesh neighbours; a missing
// neighbour at the array edge reads as zero. For each row the array also
// reduces the DB (store) and AB (addressed read) flags of its PEs: the
// value of the flagged PE's OutReg goes to the row's memory access unit.
// A mapping flags at most one PE per row per cycle (checked by assertion);
// if several are flagged, the lowest column wins.
//
// Timing: one cycle per instruction; all outputs are combinational from
// the registered PE state and the current instructions.
module pe_array
  import npcgra_pkg::*;
#(
  parameter int unsigned R = NR,
  parameter int unsigned C = NC,
  parameter int unsigned W = WORD_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mac_mode,
  input  pe_instr_t    instr   [R][C],
  input  logic [W-1:0] h_bus   [R],
  input  logic [W-1:0] v_bus   [C],
  input  logic [W-1:0] grf_data,
  output logic [W-1:0] out_reg [R][C],
  output logic         row_db  [R],
  output logic [W-1:0] row_db_data [R],
  output logic         row_ab  [R],
  output logic [W-1:0] row_ab_addr [R]
);
  logic [W-1:0] opa [R][C];
  logic         ab  [R][C];
  logic         db  [R][C];

  for (genvar r = 0; r < R; r++) begin : g_r
    for (genvar c = 0; c < C; c++) begin : g_c
      logic [W-1:0] n_out [4];
      logic [W-1:0] n_opa [4];
      assign n_out[DIR_N] = (r > 0)     ? out_reg[(r > 0 ? r-1 : 0)][c] : '0;
      assign n_out[DIR_S] = (r < R-1)   ? out_reg[(r < R-1 ? r+1 : r)][c] : '0;
      assign n_out[DIR_E] = (c < C-1)   ? out_reg[r][(c < C-1 ? c+1 : c)] : '0;
      assign n_out[DIR_W] = (c > 0)     ? out_reg[r][(c > 0 ? c-1 : 0)] : '0;
      assign n_opa[DIR_N] = (r > 0)     ? opa[(r > 0 ? r-1 : 0)][c] : '0;
      assign n_opa[DIR_S] = (r < R-1)   ? opa[(r < R-1 ? r+1 : r)][c] : '0;
      assign n_opa[DIR_E] = (c < C-1)   ? opa[r][(c < C-1 ? c+1 : c)] : '0;
      assign n_opa[DIR_W] = (c > 0)     ? opa[r][(c > 0 ? c-1 : 0)] : '0;

      pe #(.W(W)) u_pe (
        .clk(clk), .rst_n(rst_n), .mac_mode(mac_mode), .instr(instr[r][c]),
        .h_bus(h_bus[r]), .v_bus(v_bus[c]), .grf_data(grf_data),
        .nbr_out(n_out), .nbr_opa(n_opa),
        .out_reg(out_reg[r][c]), .out_a(opa[r][c]), .ab(ab[r][c]), .db(db[r][c])
      );
    end

    always_comb begin
      row_db      [r] = 1'b0;
      row_db_data [r] = '0;
      row_ab      [r] = 1'b0;
      row_ab_addr [r] = '0;
      for (int c = C-1; c >= 0; c--) begin
        if (db[r][c]) begin row_db[r] = 1'b1; row_db_data[r] = out_reg[r][c]; end
        if (ab[r][c]) begin row_ab[r] = 1'b1; row_ab_addr[r] = out_reg[r][c]; end
      end
    end

    logic [C-1:0] db_vec, ab_vec;
    for (genvar c = 0; c < C; c++) begin : g_flags
      assign db_vec[c] = db[r][c];
      assign ab_vec[c] = ab[r][c];
    end
    a_one_store_per_row: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(db_vec))
      else $error("pe_array: several PEs of row %0d drive store data", r);
    a_one_addr_per_row: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ab_vec))
      else $error("pe_array: several PEs of row %0d drive an address", r);
  end
endmodule
