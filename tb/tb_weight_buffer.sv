// tb_weight_buffer: fills all 64 entries and reads them back in random
// order, checking the one-cycle read latency.
module tb_weight_buffer;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0; always #5 clk = ~clk;
  logic we = 0, re = 0; logic [5:0] waddr, raddr; logic [143:0] wdata, rdata;
  logic [143:0] model [64];
  weight_buffer dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);
  initial begin
    repeat (1000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i);
      wdata = {$urandom, $urandom, $urandom, $urandom, $urandom}; model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 100; n++) begin
      re = 1; raddr = 6'($urandom); @(negedge clk); re = 0;
      checks++; if (rdata !== model[raddr]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
