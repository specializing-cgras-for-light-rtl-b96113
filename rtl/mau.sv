// mau: memory access unit of one H-bus (PE row) or V-bus (PE column).
//
// It merges three request sources into one memory request per cycle:
//  1. the store of the write-back phase: the AGU's store address is
//     registered, because the PE holding the data executes its context one
//     cycle after the AGU step, and is written with the row's DB data when
//     the context's h_st bit is set;
//  2. an addressed read: a PE with AB set offers its OutReg as {bank, offset};
//  3. the AGU's streamed load for the next cycle.
// Priority is 1 > 2 > 3 (a mapping never needs two in one cycle). Read
// data returns one cycle later from the memory and is driven onto the bus
// when the context's load bit (h_ld / v_ld) is set; otherwise the bus is 0.
// The request format and the priority order are this design's choice.
module mau
  import npcgra_pkg::*;
#(
  parameter int unsigned ADDR_W = $clog2(NR) + NA,
  parameter int unsigned W      = WORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // AGU (AGU step t)
  input  logic              agu_valid,
  input  logic              agu_store,
  input  logic [ADDR_W-1:0] agu_addr,
  // PE side (context of step t-1)
  input  logic              st_en,      // global h_st bit
  input  logic              db,
  input  logic [W-1:0]      db_data,
  input  logic              ab,
  input  logic [W-1:0]      ab_addr,
  input  logic              ld_en,      // global h_ld / v_ld bit
  // memory side
  output logic              req_valid,
  output logic              req_we,
  output logic [ADDR_W-1:0] req_addr,
  output logic [W-1:0]      req_wdata,
  input  logic [W-1:0]      mem_rdata,
  output logic [W-1:0]      bus
);
  logic [ADDR_W-1:0] st_addr_q;
  logic              st_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_addr_q <= '0;
      st_pend_q <= 1'b0;
    end else begin
      st_pend_q <= agu_valid && agu_store;
      if (agu_valid && agu_store) st_addr_q <= agu_addr;
    end
  end

  always_comb begin
    req_valid = 1'b0;
    req_we    = 1'b0;
    req_addr  = agu_addr;
    req_wdata = db_data;
    if (st_en && db && st_pend_q) begin
      req_valid = 1'b1;
      req_we    = 1'b1;
      req_addr  = st_addr_q;
    end else if (ab) begin
      req_valid = 1'b1;
      req_addr  = ADDR_W'(ab_addr);
    end else if (agu_valid && !agu_store) begin
      req_valid = 1'b1;
    end
  end

  assign bus = ld_en ? mem_rdata : '0;
endmodule
