// tb_config_memory: writes all 32 contexts of 2312 bits, reads them back
// with one cycle of latency and checks the all-NOP output after re = 0.
module tb_config_memory;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic we = 0, re = 0; logic [4:0] waddr, raddr; logic [CTX_W-1:0] wdata, rdata;
  logic [CTX_W-1:0] model [32];
  config_memory dut (.clk, .rst_n, .we, .waddr, .wdata, .re, .raddr, .rdata);
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i);
      for (int b = 0; b < CTX_W; b += 32) wdata[b +: 32] = $urandom;
      model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 64; n++) begin
      re = 1; raddr = 5'($urandom); @(negedge clk);
      checks++; if (rdata !== model[raddr]) failures++;
    end
    re = 0; @(negedge clk);
    checks++; if (rdata !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
