// h_agu: H-MEM address generator of one PE row (row number aid = AID_r).
//
// From the iterators broadcast by the controller it computes, each cycle,
// the {bank, offset} address of the streamed load or store of its row:
//  - PWC (Algorithm 1): load  offset = tid_r*N_i + t_cycle + addr_IFM in
//    bank AID_r; store offset = tid_c*N_c + tid_r*N_c*B_c + j + addr_OFM,
//    with j the write-back step (t_cycle - N_i).
//  - DWC, any stride (Algorithm 2): groups of S input rows go round-robin
//    over the banks; with g = t_wrap/S + AID_r the bank is g % N_r and the
//    offset (tid_r + g/N_r)*block_w*S + (t_wrap%S)*block_w + tid_c*S*N_c +
//    t_wcycle + addr_IFM, block_w = S*(B_c*N_c - 1) + K.
//  - DWC, S = 1 (Algorithm 3): input rows go round-robin over the banks;
//    with g = t_wrap + AID_r the bank is g % N_r, the row base is
//    (tid_r + g/N_r)*block_w + tid_c*N_c + addr_IFM with
//    block_w = B_c*N_c + K - 1, and the column within the row is t_wcycle
//    for kernel row 0 (prologue and expand-east), K-1-t_wcycle for odd rows
//    (expand-west) and N_c-1+t_wcycle for even rows (expand-east).
//  - Stores of both DWC mappings use the PWC store address in bank AID_r.
// Departures from the published listings: the store offset counts the
// write-back step from 0 (the listings subtract pipeline offsets of their
// own schedule), the S = 1 block width is written for any K (the listing
// gives 2 + B_c*N_c, i.e. K = 3), and addr_IFM is added to the DWC load
// offsets so that two channels can live in H-MEM at once.
//
// Purely combinational. valid is 1 in the load and store phases.
module h_agu
  import npcgra_pkg::*;
#(
  parameter int unsigned R  = NR,
  parameter int unsigned C  = NC,
  parameter int unsigned AW = NA
) (
  input  logic [$clog2(R)-1:0]    aid,
  input  agu_ctrl_t               ctrl,
  output logic                    valid,
  output logic                    is_store,
  output logic [$clog2(R)+AW-1:0] addr
);
  localparam int unsigned BW = $clog2(R);

  int unsigned g, bank, over, block_w, offs, col, st_offs;

  always_comb begin
    g = 0; bank = 32'(aid); over = 0; block_w = 0; offs = 0; col = 0;
    st_offs = 32'(ctrl.tid_c)*C + 32'(ctrl.tid_r)*C*32'(ctrl.bc) + 32'(ctrl.t_wcycle)
            + 32'(ctrl.addr_ofm);
    unique case (ctrl.mode)
      MODE_PWC: begin
        offs = 32'(ctrl.tid_r)*32'(ctrl.ni) + 32'(ctrl.t_cycle) + 32'(ctrl.addr_ifm);
      end
      MODE_DWC_GEN: begin
        g       = 32'(ctrl.t_wrap) / 32'(ctrl.s) + 32'(aid);
        bank    = g % R;
        over    = g / R;
        block_w = 32'(ctrl.s)*(32'(ctrl.bc)*C - 1) + 32'(ctrl.k);
        offs    = (32'(ctrl.tid_r) + over)*block_w*32'(ctrl.s)
                + (32'(ctrl.t_wrap) % 32'(ctrl.s))*block_w
                + 32'(ctrl.tid_c)*32'(ctrl.s)*C + 32'(ctrl.t_wcycle) + 32'(ctrl.addr_ifm);
      end
      default: begin  // MODE_DWC_S1
        g       = 32'(ctrl.t_wrap) + 32'(aid);
        bank    = g % R;
        over    = g / R;
        block_w = 32'(ctrl.bc)*C + 32'(ctrl.k) - 1;
        if (ctrl.t_wrap == 0)     col = 32'(ctrl.t_wcycle);
        else if (ctrl.t_wrap[0])  col = 32'(ctrl.k) - 1 - 32'(ctrl.t_wcycle);
        else                      col = C - 1 + 32'(ctrl.t_wcycle);
        offs    = (32'(ctrl.tid_r) + over)*block_w + 32'(ctrl.tid_c)*C + col
                + 32'(ctrl.addr_ifm);
      end
    endcase

    valid    = ctrl.load | ctrl.store;
    is_store = ctrl.store;
    if (ctrl.store) addr = {aid, AW'(st_offs)};
    else            addr = {BW'(bank), AW'(offs)};
  end
endmodule
