// cgra_controller: sequencer of the NP-CGRA.
//
// On start it latches a kernel descriptor (mapping mode, N_i, K, S, B_r x
// B_c tiles, base addresses) and runs one block: B_r*B_c tiles, tid_c
// counting fastest. A tile is a sequence of "wraps" (t_wrap); t_cycle
// counts the cycles of the tile and t_wcycle those of the current wrap:
//   PWC          wrap 0: N_i load cycles
//   DWC, any S   wraps 0..K-1: (N_c-1)*S + K load cycles each
//   DWC, S = 1   wrap 0: N_c-1+K cycles (prologue + expand-east),
//                wraps 1..K-1: K cycles (shift-south + expand-west/east)
// followed by a store wrap of N_c write-back cycles and one idle cycle
// that lets the last store leave the pipeline before the next tile's
// first load uses the same bank port. The iterators go to all AGUs.
// Each cycle the controller also fetches the context of the step:
//   PWC: 0 while loading, 1+j for write-back step j
//   DWC, any S: t_wcycle while loading, (N_c-1)*S+K + j for write-back
//   DWC, S = 1: t_cycle while loading, N_c-1+K*K + j for write-back
// If the descriptor asks for it, the GRF is first refilled from a weight
// buffer entry (two cycles).
// The iterator definitions and the tile formulas follow the published
// mapping; the idle cycle, the context numbering and the tile order are
// this design's choice. A tile takes L + N_c + 1 cycles, L being the load
// cycles listed above; done pulses one cycle after the last tile.
module cgra_controller
  import npcgra_pkg::*;
#(
  parameter int unsigned R = NR,
  parameter int unsigned C = NC,
  parameter int unsigned CTX_AW = $clog2(CTX_DEPTH),
  parameter int unsigned WB_AW  = $clog2(WB_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  kernel_desc_t      desc,
  output logic              busy,
  output logic              done,
  output agu_ctrl_t         agu_ctrl,
  output logic              ctx_re,
  output logic [CTX_AW-1:0] ctx_raddr,
  output logic              wb_re,
  output logic [WB_AW-1:0]  wb_raddr,
  output logic              grf_we
);
  typedef enum logic [2:0] { S_IDLE, S_GRF_RD, S_GRF_WR, S_RUN, S_DONE } state_e;
  state_e       state;
  kernel_desc_t d;

  logic [11:0] t_cycle, t_wcycle;
  logic [4:0]  t_wrap;
  logic [5:0]  tid_r, tid_c;

  logic [4:0]  store_wrap;
  logic [11:0] wrap_len, gen_w, s1_w0;
  logic        ld_ph, st_ph, last_tile;

  always_comb begin
    store_wrap = (d.mode == MODE_PWC) ? 5'd1 : 5'(d.k);
    gen_w      = 12'(C - 1) * 12'(d.s) + 12'(d.k);
    s1_w0      = 12'(C - 1) + 12'(d.k);
    ld_ph      = (t_wrap < store_wrap);
    st_ph      = (t_wrap == store_wrap);
    if (st_ph)       wrap_len = 12'(C);
    else if (!ld_ph) wrap_len = 12'd1;
    else begin
      unique case (d.mode)
        MODE_PWC:     wrap_len = 12'(d.ni);
        MODE_DWC_GEN: wrap_len = gen_w;
        default:      wrap_len = (t_wrap == 0) ? s1_w0 : 12'(d.k);
      endcase
    end
    last_tile = (tid_r == d.br - 6'd1) && (tid_c == d.bc - 6'd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      d        <= '0;
      t_cycle  <= '0;
      t_wcycle <= '0;
      t_wrap   <= '0;
      tid_r    <= '0;
      tid_c    <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          d        <= desc;
          t_cycle  <= '0;
          t_wcycle <= '0;
          t_wrap   <= '0;
          tid_r    <= '0;
          tid_c    <= '0;
          state    <= desc.load_grf ? S_GRF_RD : S_RUN;
        end
        S_GRF_RD: state <= S_GRF_WR;
        S_GRF_WR: state <= S_RUN;
        S_RUN: begin
          t_cycle <= t_cycle + 12'd1;
          if (t_wcycle == wrap_len - 12'd1) begin
            t_wcycle <= '0;
            if (t_wrap == store_wrap + 5'd1) begin
              t_wrap  <= '0;
              t_cycle <= '0;
              if (last_tile) state <= S_DONE;
              else if (tid_c == d.bc - 6'd1) begin
                tid_c <= '0;
                tid_r <= tid_r + 6'd1;
              end else
                tid_c <= tid_c + 6'd1;
            end else
              t_wrap <= t_wrap + 5'd1;
          end else
            t_wcycle <= t_wcycle + 12'd1;
        end
        default: state <= S_IDLE;   // S_DONE
      endcase
    end
  end

  always_comb begin
    agu_ctrl          = '0;
    agu_ctrl.mode     = d.mode;
    agu_ctrl.load     = (state == S_RUN) && ld_ph;
    agu_ctrl.store    = (state == S_RUN) && st_ph;
    agu_ctrl.t_cycle  = t_cycle;
    agu_ctrl.t_wrap   = t_wrap;
    agu_ctrl.t_wcycle = t_wcycle;
    agu_ctrl.tid_r    = tid_r;
    agu_ctrl.tid_c    = tid_c;
    agu_ctrl.ni       = d.ni;
    agu_ctrl.k        = d.k;
    agu_ctrl.s        = d.s;
    agu_ctrl.bc       = d.bc;
    agu_ctrl.addr_ifm = d.addr_ifm;
    agu_ctrl.addr_ofm = d.addr_ofm;
    agu_ctrl.addr_vin = d.addr_vin;

    ctx_re    = (state == S_RUN) && (ld_ph || st_ph);
    ctx_raddr = '0;
    unique case (d.mode)
      MODE_PWC:     ctx_raddr = ld_ph ? '0 : CTX_AW'(12'd1 + t_wcycle);
      MODE_DWC_GEN: ctx_raddr = ld_ph ? CTX_AW'(t_wcycle) : CTX_AW'(gen_w + t_wcycle);
      default:      ctx_raddr = ld_ph ? CTX_AW'(t_cycle)
                                      : CTX_AW'(12'(C - 1) + 12'(d.k) * 12'(d.k) + t_wcycle);
    endcase

    wb_re    = (state == S_GRF_RD);
    wb_raddr = d.wb_entry;
    grf_we   = (state == S_GRF_WR);
    busy     = (state != S_IDLE);
    done     = (state == S_DONE);
  end

  a_desc_ok: assert property (@(posedge clk) disable iff (!rst_n)
      (start && state == S_IDLE) |-> (desc.br != 0 && desc.bc != 0 && desc.k != 0 &&
                                      (desc.mode == MODE_PWC ? desc.ni != 0 : desc.s != 0)))
    else $error("cgra_controller: invalid kernel descriptor");
endmodule
