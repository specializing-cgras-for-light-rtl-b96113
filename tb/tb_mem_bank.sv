// tb_mem_bank: random reads and writes on both ports against a model,
// including simultaneous accesses, same-address writes (port A wins) and
// out-of-range offsets.
module tb_mem_bank;
  import npcgra_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0; always #5 clk = ~clk;
  localparam int D = MEM_DEPTH;
  logic a_en, a_we, b_en, b_we; logic [11:0] a_addr, b_addr; logic [15:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [15:0] model [4096];
  mem_bank dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [15:0] ea, eb; logic ra, rb;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // initialise through port B
    for (int i = 0; i < D; i++) begin
      @(negedge clk); b_en = 1; b_we = 1; b_addr = 12'(i); b_wdata = 16'($urandom); model[i] = b_wdata;
    end
    for (int i = D; i < 4096; i++) model[i] = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      a_en = 1'($urandom); a_we = 1'($urandom); b_en = 1'($urandom); b_we = 1'($urandom);
      a_addr = 12'($urandom_range(0, D + 20)); b_addr = (n % 7 == 0) ? a_addr : 12'($urandom_range(0, D + 20));
      a_wdata = 16'($urandom); b_wdata = 16'($urandom);
      ra = a_en && !a_we; rb = b_en && !b_we;
      ea = model[a_addr]; eb = model[b_addr];
      if (b_en && b_we && b_addr < D) model[b_addr] = b_wdata;
      if (a_en && a_we && a_addr < D) model[a_addr] = a_wdata;
      @(negedge clk);
      if (ra) begin checks++; if (a_rdata !== ea) failures++; end
      if (rb) begin checks++; if (b_rdata !== eb) failures++; end
      a_en = 0; b_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
