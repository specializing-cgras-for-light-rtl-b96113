// tb_grf: loads the GRF with random words and reads every index back,
// including out-of-range indices, and checks that a load replaces all nine.
module tb_grf;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, we = 0;
  always #5 clk = ~clk;
  logic [143:0] wdata; logic [3:0] idx; logic [15:0] rdata;
  grf dut (.clk, .rst_n, .we, .wdata, .idx, .rdata);
  initial begin
    repeat (500) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] w [9];
    idx = 0; wdata = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      for (int i = 0; i < 9; i++) begin w[i] = 16'($urandom); wdata[i*16 +: 16] = w[i]; end
      we = 1; @(negedge clk); we = 0;
      for (int i = 0; i < 16; i++) begin
        idx = 4'(i); #1; checks++;
        if (rdata !== (i < 9 ? w[i] : 16'h0)) begin failures++; $display("FAIL idx %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
