// tb_mem_crossbar: eight requesters address the eight banks through random
// permutations (no conflicts, as the mappings guarantee); bank memories are
// modelled in the testbench with one cycle of read latency. Writes must
// land in the addressed bank and reads must return to the requester that
// issued them.
module tb_mem_crossbar;
  import npcgra_pkg::*;
  localparam int N = NR;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic req_valid [N], req_we [N], bank_en [N], bank_we [N];
  logic [14:0] req_addr [N]; logic [11:0] bank_addr [N];
  logic [15:0] req_wdata [N], rdata [N], bank_wdata [N], bank_rdata [N];
  logic [15:0] mem [N][64];
  mem_crossbar dut (.clk, .rst_n, .req_valid, .req_we, .req_addr, .req_wdata, .rdata,
                    .bank_en, .bank_we, .bank_addr, .bank_wdata, .bank_rdata);
  always_ff @(posedge clk)
    for (int b = 0; b < N; b++)
      if (bank_en[b]) begin
        if (bank_we[b]) mem[b][bank_addr[b][5:0]] <= bank_wdata[b];
        else            bank_rdata[b] <= mem[b][bank_addr[b][5:0]];
      end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int perm [N]; logic [15:0] model [N][64]; logic [15:0] expd [N]; logic rd [N];
    for (int b = 0; b < N; b++) for (int a = 0; a < 64; a++) begin mem[b][a] = 0; model[b][a] = 0; end
    for (int i = 0; i < N; i++) begin req_valid[i] = 0; req_we[i] = 0; req_addr[i] = 0; req_wdata[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin int j, t; j = $urandom_range(0, i); t = perm[i]; perm[i] = perm[j]; perm[j] = t; end
      for (int i = 0; i < N; i++) begin
        int a; a = $urandom_range(0, 63);
        req_valid[i] = 1'($urandom_range(0, 3) != 0);
        req_we[i] = (n < 100) ? 1'b1 : 1'($urandom);
        req_addr[i] = {3'(perm[i]), 12'(a)};
        req_wdata[i] = 16'($urandom);
        rd[i] = req_valid[i] && !req_we[i];
        expd[i] = model[perm[i]][a];
        if (req_valid[i] && req_we[i]) model[perm[i]][a] = req_wdata[i];
      end
      @(negedge clk);
      for (int i = 0; i < N; i++) req_addr[i] = 15'($urandom);
      #1;
      for (int i = 0; i < N; i++) begin
        if (rd[i]) begin checks++; if (rdata[i] !== expd[i]) failures++; end
        req_valid[i] = 0;
        req_addr[i] = 15'($urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
