// tb_mau: checks the memory access unit's request merging: streamed loads
// pass the AGU address, a store uses the AGU store address of the previous
// cycle with the DB data, an addressed read (AB) overrides the stream, a
// store wins over an addressed read, and the bus shows read data only when
// the load bit is set.
module tb_mau;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic agu_valid, agu_store, st_en, db, ab, ld_en, req_valid, req_we;
  logic [14:0] agu_addr, req_addr; logic [15:0] db_data, ab_addr, req_wdata, mem_rdata, bus;
  mau dut (.clk, .rst_n, .agu_valid, .agu_store, .agu_addr, .st_en, .db, .db_data, .ab, .ab_addr,
           .ld_en, .req_valid, .req_we, .req_addr, .req_wdata, .mem_rdata, .bus);
  task automatic exp_req(logic v, logic we, logic [14:0] a, logic [15:0] wd, string what);
    checks++;
    if (req_valid !== v || (v && (req_we !== we || req_addr !== a || (we && req_wdata !== wd)))) begin
      failures++; $display("FAIL %s: v=%0d we=%0d a=%h wd=%h", what, req_valid, req_we, req_addr, req_wdata);
    end
  endtask
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    {agu_valid, agu_store, st_en, db, ab, ld_en} = '0; agu_addr = 0; db_data = 0; ab_addr = 0; mem_rdata = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    // streamed loads
    for (int n = 0; n < 20; n++) begin
      agu_valid = 1; agu_addr = 15'($urandom); #1; exp_req(1, 0, agu_addr, 0, "stream"); @(negedge clk);
    end
    // addressed read overrides the stream
    ab = 1; ab_addr = 16'h2345; #1; exp_req(1, 0, 15'h2345, 0, "addressed"); ab = 0;
    // store: AGU store address in step t, data in step t+1
    for (int j = 0; j < 8; j++) begin
      logic [14:0] sa; sa = 15'(16'h4000 + j * 3);
      agu_store = 1; agu_addr = sa;
      if (j > 0) begin st_en = 1; db = 1; db_data = 16'(j * 11); end
      @(negedge clk);
      st_en = 1; db = 1; db_data = 16'(1000 + j); ab = (j == 3); ab_addr = 16'h1111; agu_valid = 0;
      agu_addr = 15'h7fff; #1;
      exp_req(1, 1, sa, 16'(1000 + j), "store");
      agu_valid = 1;
    end
    agu_store = 0; agu_valid = 0; st_en = 0; db = 0; ab = 0; #1;
    @(negedge clk); #1; exp_req(0, 0, 0, 0, "idle");
    // store enable without a pending AGU store does nothing
    st_en = 1; db = 1; #1; exp_req(0, 0, 0, 0, "no pending store"); st_en = 0; db = 0;
    // bus gating
    mem_rdata = 16'hbeef; ld_en = 1; #1; checks++; if (bus !== 16'hbeef) failures++;
    ld_en = 0; #1; checks++; if (bus !== 16'h0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
