// mem_crossbar: crossbar between the H-MAUs and the H-MEM banks.
//
// Requester i (the MAU of PE row i) may address any bank; the bank is the
// top field of its {bank, offset} address. Each bank takes the request of
// the lowest-numbered requester that addresses it. The mappings never make
// two requesters address one bank in a cycle (the DWC layouts rotate rows
// over the banks); an assertion reports a conflict. Read data returns to
// the requester through a bank select registered with the request, so it
// follows the banks' one-cycle read latency.
module mem_crossbar
  import npcgra_pkg::*;
#(
  parameter int unsigned N  = NR,
  parameter int unsigned AW = NA,
  parameter int unsigned W  = WORD_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid [N],
  input  logic                    req_we    [N],
  input  logic [$clog2(N)+AW-1:0] req_addr  [N],
  input  logic [W-1:0]            req_wdata [N],
  output logic [W-1:0]            rdata     [N],
  output logic                    bank_en    [N],
  output logic                    bank_we    [N],
  output logic [AW-1:0]           bank_addr  [N],
  output logic [W-1:0]            bank_wdata [N],
  input  logic [W-1:0]            bank_rdata [N]
);
  localparam int unsigned BW = $clog2(N);
  logic [BW-1:0] rsel_q [N];
  logic [N-1:0]  hits   [N];   // hits[b][i]: requester i addresses bank b

  always_comb begin
    for (int b = 0; b < N; b++) begin
      bank_en[b]    = 1'b0;
      bank_we[b]    = 1'b0;
      bank_addr[b]  = '0;
      bank_wdata[b] = '0;
      hits[b]       = '0;
      for (int i = N-1; i >= 0; i--) begin
        if (req_valid[i] && req_addr[i][BW+AW-1:AW] == BW'(b)) begin
          hits[b][i]    = 1'b1;
          bank_en[b]    = 1'b1;
          bank_we[b]    = req_we[i];
          bank_addr[b]  = req_addr[i][AW-1:0];
          bank_wdata[b] = req_wdata[i];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) rsel_q[i] <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (req_valid[i]) rsel_q[i] <= req_addr[i][BW+AW-1:AW];
    end
  end

  always_comb
    for (int i = 0; i < N; i++) rdata[i] = bank_rdata[rsel_q[i]];

  for (genvar b = 0; b < N; b++) begin : g_chk
    a_no_conflict: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hits[b]))
      else $error("mem_crossbar: several requesters address bank %0d", b);
  end
endmodule
