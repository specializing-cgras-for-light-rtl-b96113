// v_agu: V-MEM address generator of one PE column (column aid = AID_c).
//
// Each column has its own V-MEM bank, so the bank field is always AID_c.
//  - PWC, Eq. (1): offset = tid_c*N_i + t_cycle (weights of output column
//    tid_c*N_c + AID_c stored row after row).
//  - DWC, any stride: offset = t_wcycle - AID_c*S + t_wrap*K, i.e. weight
//    (t_wrap, t_wcycle - AID_c*S) of the channel, duplicated in all banks.
//    The request is valid only while that column index lies in 0..K-1,
//    which is exactly when the column's PEs consume a weight.
//  - DWC, S = 1: V-MEM feeds only the bottom PE row at the first cycle of
//    kernel rows 1..K-1 (the shift-south phase). This design stores, in bank
//    c, the element needed by column c for kernel row i of tile (tid_r,
//    tid_c) at offset (tid_r*(K-1) + i-1)*B_c + tid_c. The published text
//    gives only the bank assignment (elements N_c apart share a bank), so
//    this offset order is this design's own.
// addr_vin is added to every offset (0 gives the published formulas).
//
// Purely combinational.
module v_agu
  import npcgra_pkg::*;
#(
  parameter int unsigned C  = NC,
  parameter int unsigned AW = NA
) (
  input  logic [$clog2(C)-1:0]    aid,
  input  agu_ctrl_t               ctrl,
  output logic                    valid,
  output logic [$clog2(C)+AW-1:0] addr
);
  int signed rel;
  int unsigned offs;

  always_comb begin
    rel   = 0;
    offs  = 0;
    valid = 1'b0;
    unique case (ctrl.mode)
      MODE_PWC: begin
        offs  = 32'(ctrl.tid_c)*32'(ctrl.ni) + 32'(ctrl.t_cycle);
        valid = ctrl.load;
      end
      MODE_DWC_GEN: begin
        rel   = int'(ctrl.t_wcycle) - int'(aid)*int'(ctrl.s);
        offs  = 32'(rel + int'(ctrl.t_wrap)*int'(ctrl.k));
        valid = ctrl.load && rel >= 0 && rel < int'(ctrl.k);
      end
      default: begin  // MODE_DWC_S1
        offs  = (32'(ctrl.tid_r)*(32'(ctrl.k) - 1) + 32'(ctrl.t_wrap) - 1)*32'(ctrl.bc)
              + 32'(ctrl.tid_c);
        valid = ctrl.load && ctrl.t_wrap != 0 && ctrl.t_wcycle == 0;
      end
    endcase
    addr = {aid, AW'(offs + 32'(ctrl.addr_vin))};
  end
endmodule
