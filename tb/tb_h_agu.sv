// tb_h_agu: walks the iterators of whole tiles for the three mappings and
// compares the H-AGU address of every row with the location, under the
// documented data layouts, of the element that row's PEs need in that
// step (and with the output location in the write-back steps).
module tb_h_agu;
  import npcgra_pkg::*;
  import tb_layout_pkg::*;
  localparam int R = NR, C = NC;
  int checks = 0, failures = 0;
  agu_ctrl_t ctrl;
  logic valid [R], is_store [R]; logic [14:0] addr [R];
  for (genvar r = 0; r < R; r++) begin : g
    h_agu dut (.aid(3'(r)), .ctrl(ctrl), .valid(valid[r]), .is_store(is_store[r]), .addr(addr[r]));
  end

  task automatic expect_loc(int r, loc_t l, bit st, string what);
    checks++;
    if (!valid[r] || is_store[r] !== st || addr[r] !== {3'(l.bank), 12'(l.offs)}) begin
      failures++;
      if (failures < 10) $display("FAIL %s row %0d: got %h exp bank %0d offs %0d", what, r, addr[r], l.bank, l.offs);
    end
  endtask

  task automatic store_phase(int tr, int tc, int bc, int aofm, int st_wrap);
    ctrl.load = 0; ctrl.store = 1; ctrl.t_wrap = 5'(st_wrap);
    for (int j = 0; j < C; j++) begin
      ctrl.t_wcycle = 12'(j); #1;
      for (int r = 0; r < R; r++) expect_loc(r, ofm(tr * R + r, tc * C + j, bc, aofm, R, C), 1, "store");
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctrl = '0;
    // ---- PWC ----
    ctrl.mode = MODE_PWC; ctrl.ni = 12'd20; ctrl.bc = 6'd2; ctrl.addr_ifm = 12'd100; ctrl.addr_ofm = 12'd900;
    for (int tr = 0; tr < 2; tr++) for (int tc = 0; tc < 2; tc++) begin
      ctrl.tid_r = 6'(tr); ctrl.tid_c = 6'(tc); ctrl.load = 1; ctrl.store = 0; ctrl.t_wrap = 0;
      for (int t = 0; t < 20; t++) begin
        ctrl.t_cycle = 12'(t); ctrl.t_wcycle = 12'(t); #1;
        for (int r = 0; r < R; r++) expect_loc(r, pwc_ifm(tr * R + r, t, 20, 100, R), 0, "pwc load");
      end
      store_phase(tr, tc, 2, 900, 1);
    end
    // ---- DWC, any stride: S = 2 and S = 3, K = 3 ----
    for (int s = 2; s <= 3; s++) begin
      ctrl.mode = MODE_DWC_GEN; ctrl.k = 4'd3; ctrl.s = 3'(s); ctrl.bc = 6'd2;
      ctrl.addr_ifm = 12'd40; ctrl.addr_ofm = 12'd1500;
      for (int tr = 0; tr < 2; tr++) for (int tc = 0; tc < 2; tc++) begin
        ctrl.tid_r = 6'(tr); ctrl.tid_c = 6'(tc); ctrl.load = 1; ctrl.store = 0;
        for (int i = 0; i < 3; i++) begin
          ctrl.t_wrap = 5'(i);
          for (int t = 0; t < (C - 1) * s + 3; t++) begin
            ctrl.t_wcycle = 12'(t); #1;
            for (int r = 0; r < R; r++)
              expect_loc(r, gen_ifm((tr * R + r) * s + i, tc * C * s + t, s, 3, 2, 40, R, C), 0, "gen load");
          end
        end
        store_phase(tr, tc, 2, 1500, 3);
      end
    end
    // ---- DWC, S = 1, K = 3 ----
    ctrl.mode = MODE_DWC_S1; ctrl.k = 4'd3; ctrl.s = 3'd1; ctrl.bc = 6'd2; ctrl.addr_ifm = 12'd7; ctrl.addr_ofm = 12'd1200;
    for (int tr = 0; tr < 2; tr++) for (int tc = 0; tc < 2; tc++) begin
      ctrl.tid_r = 6'(tr); ctrl.tid_c = 6'(tc); ctrl.load = 1; ctrl.store = 0;
      // kernel row 0: prologue + expand east, columns 0 .. C+1 of the input row
      ctrl.t_wrap = 0;
      for (int t = 0; t < C - 1 + 3; t++) begin
        ctrl.t_wcycle = 12'(t); #1;
        for (int r = 0; r < R; r++) expect_loc(r, s1_ifm(tr * R + r, tc * C + t, 3, 2, 7, R, C), 0, "s1 row0");
      end
      for (int i = 1; i < 3; i++) begin
        ctrl.t_wrap = 5'(i);
        for (int t = 1; t < 3; t++) begin
          // odd row expands west: the west column needs input column K-1-t;
          // even row expands east: the east column needs input column C-1+t
          int col; col = (i % 2 == 1) ? 3 - 1 - t : C - 1 + t;
          ctrl.t_wcycle = 12'(t); #1;
          for (int r = 0; r < R; r++) expect_loc(r, s1_ifm(tr * R + r + i, tc * C + col, 3, 2, 7, R, C), 0, "s1 row i");
        end
      end
      store_phase(tr, tc, 2, 1200, 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
