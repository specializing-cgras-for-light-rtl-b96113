// tb_v_agu: checks the V-AGU of every column against the V-MEM layouts:
// PWC weight columns, DWC weights (valid only while the column uses a
// weight) and the shift-south copies of DWC with S = 1.
module tb_v_agu;
  import npcgra_pkg::*;
  import tb_layout_pkg::*;
  localparam int C = NC;
  int checks = 0, failures = 0;
  agu_ctrl_t ctrl;
  logic valid [C]; logic [14:0] addr [C];
  for (genvar c = 0; c < C; c++) begin : g
    v_agu dut (.aid(3'(c)), .ctrl(ctrl), .valid(valid[c]), .addr(addr[c]));
  end
  task automatic expect_v(int c, bit v, loc_t l, string what);
    checks++;
    if (valid[c] !== v || (v && addr[c] !== {3'(l.bank), 12'(l.offs)})) begin
      failures++;
      if (failures < 10) $display("FAIL %s col %0d: v=%0d addr %h exp %0d/%0d", what, c, valid[c], addr[c], l.bank, l.offs);
    end
  endtask
  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    loc_t l;
    ctrl = '0;
    ctrl.mode = MODE_PWC; ctrl.ni = 12'd17; ctrl.load = 1;
    for (int tc = 0; tc < 3; tc++) for (int t = 0; t < 17; t++) begin
      ctrl.tid_c = 6'(tc); ctrl.t_cycle = 12'(t); #1;
      for (int c = 0; c < C; c++) expect_v(c, 1, pwc_wgt(tc * C + c, t, 17, C), "pwc");
    end
    ctrl.load = 0; #1; expect_v(0, 0, l, "pwc idle");
    // DWC any stride, K = 3, S = 2
    ctrl.mode = MODE_DWC_GEN; ctrl.k = 4'd3; ctrl.s = 3'd2; ctrl.load = 1;
    for (int i = 0; i < 3; i++) for (int t = 0; t < (C - 1) * 2 + 3; t++) begin
      ctrl.t_wrap = 5'(i); ctrl.t_wcycle = 12'(t); #1;
      for (int c = 0; c < C; c++) begin
        int j; j = t - c * 2;
        l.bank = c; l.offs = i * 3 + j;
        expect_v(c, (j >= 0 && j < 3), l, "gen");
      end
    end
    // DWC S = 1: valid only at the first step of kernel rows 1..K-1
    ctrl.mode = MODE_DWC_S1; ctrl.k = 4'd3; ctrl.s = 3'd1; ctrl.bc = 6'd3; ctrl.addr_vin = 12'd500;
    for (int tr = 0; tr < 2; tr++) for (int tc = 0; tc < 3; tc++) for (int i = 0; i < 3; i++)
      for (int t = 0; t < 3; t++) begin
        ctrl.tid_r = 6'(tr); ctrl.tid_c = 6'(tc); ctrl.t_wrap = 5'(i); ctrl.t_wcycle = 12'(t); #1;
        for (int c = 0; c < C; c++)
          expect_v(c, (i > 0 && t == 0), s1_vmem(tr, tc, i, c, 3, 3, 500), "s1");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
