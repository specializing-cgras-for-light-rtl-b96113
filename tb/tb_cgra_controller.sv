// tb_cgra_controller: runs one block in each mapping mode and checks, cycle
// by cycle, the phase flags, the iterators, the tile coordinates and the
// context address against nested loops written from the tile schedule, the
// GRF refill handshake, and the block latency of B_r*B_c*(L + N_c + 1)
// cycles (L = load cycles of a tile) plus the refill.
module tb_cgra_controller;
  import npcgra_pkg::*;
  localparam int C = NC;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0; always #5 clk = ~clk;
  logic start, busy, done, ctx_re, wb_re, grf_we; logic [4:0] ctx_raddr; logic [5:0] wb_raddr;
  kernel_desc_t desc; agu_ctrl_t agu_ctrl;
  cgra_controller dut (.clk, .rst_n, .start, .desc, .busy, .done, .agu_ctrl, .ctx_re, .ctx_raddr,
                       .wb_re, .wb_raddr, .grf_we);

  task automatic step(bit ld, bit st, int wrap, int wc, int tc, int tr, bit re, int ctx);
    checks++;
    if (agu_ctrl.load !== ld || agu_ctrl.store !== st || int'(agu_ctrl.t_wrap) != wrap ||
        int'(agu_ctrl.t_wcycle) != wc || int'(agu_ctrl.tid_c) != tc || int'(agu_ctrl.tid_r) != tr ||
        ctx_re !== re || (re && int'(ctx_raddr) != ctx)) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t exp ld%0d st%0d wrap%0d wc%0d tc%0d tr%0d ctx%0d got ld%0d st%0d wrap%0d wc%0d tc%0d tr%0d ctx%0d",
        $time, ld, st, wrap, wc, tc, tr, ctx, agu_ctrl.load, agu_ctrl.store, agu_ctrl.t_wrap, agu_ctrl.t_wcycle,
        agu_ctrl.tid_c, agu_ctrl.tid_r, ctx_raddr);
    end
    @(negedge clk);
  endtask

  task automatic run(mode_e m, int ni, int k, int s, int br, int bc, bit grf);
    int cyc, exp_cyc, tcyc;
    desc = '0; desc.mode = m; desc.ni = 12'(ni); desc.k = 4'(k); desc.s = 3'(s);
    desc.br = 6'(br); desc.bc = 6'(bc); desc.load_grf = grf; desc.wb_entry = 6'd5;
    start = 1; @(negedge clk); start = 0; cyc = 1;
    if (grf) begin
      checks++; if (!(wb_re && wb_raddr == 6'd5)) failures++; @(negedge clk);
      checks++; if (!grf_we) failures++; @(negedge clk); cyc += 2;
    end
    for (int tr = 0; tr < br; tr++) for (int tc = 0; tc < bc; tc++) begin
      tcyc = 0;
      if (m == MODE_PWC) begin
        for (int t = 0; t < ni; t++) step(1, 0, 0, t, tc, tr, 1, 0);
        for (int j = 0; j < C; j++) step(0, 1, 1, j, tc, tr, 1, 1 + j);
        step(0, 0, 2, 0, tc, tr, 0, 0);
        cyc += ni + C + 1;
      end else if (m == MODE_DWC_GEN) begin
        int w; w = (C - 1) * s + k;
        for (int i = 0; i < k; i++) for (int t = 0; t < w; t++) step(1, 0, i, t, tc, tr, 1, t);
        for (int j = 0; j < C; j++) step(0, 1, k, j, tc, tr, 1, w + j);
        step(0, 0, k + 1, 0, tc, tr, 0, 0);
        cyc += k * w + C + 1;
      end else begin
        for (int t = 0; t < C - 1 + k; t++) begin step(1, 0, 0, t, tc, tr, 1, tcyc); tcyc++; end
        for (int i = 1; i < k; i++) for (int t = 0; t < k; t++) begin step(1, 0, i, t, tc, tr, 1, tcyc); tcyc++; end
        for (int j = 0; j < C; j++) step(0, 1, k, j, tc, tr, 1, C - 1 + k * k + j);
        step(0, 0, k + 1, 0, tc, tr, 0, 0);
        cyc += C - 1 + k * k + C + 1;
      end
    end
    checks++; if (!done) begin failures++; $display("FAIL no done"); end
    @(negedge clk);
    checks++; if (busy) failures++;
    // published tile latency: PWC N_i + lambda, DWC general K((N_c-1)S+K) + lambda,
    // DWC optimised K^2 + N_c - 1 + lambda, here lambda = N_c + 1
    exp_cyc = 1 + (grf ? 2 : 0) + br * bc * (C + 1 +
              (m == MODE_PWC ? ni : m == MODE_DWC_GEN ? k * ((C - 1) * s + k) : k * k + C - 1));
    checks++; if (cyc != exp_cyc) begin failures++; $display("FAIL latency %0d vs %0d", cyc, exp_cyc); end
  endtask

  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    start = 0; desc = '0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    run(MODE_PWC, 20, 1, 1, 2, 3, 0);
    run(MODE_DWC_GEN, 0, 3, 2, 2, 2, 0);
    run(MODE_DWC_S1, 0, 3, 1, 2, 2, 1);
    run(MODE_DWC_GEN, 0, 5, 2, 1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
