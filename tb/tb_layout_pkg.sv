// tb_layout_pkg: data layouts and context programs used by the testbenches.
//
// The layout functions give, for an element of a tensor, the memory bank
// and offset where the mapping expects it. They are written from the
// meaning of each layout (which row goes to which bank, how rows are
// packed), not from the AGU equations, so the AGU tests compare two
// independent descriptions. The context builders produce the per-cycle PE
// programs of the three mappings (PWC, DWC with any stride, DWC with S = 1)
// for an R x C array.
package tb_layout_pkg;
  import npcgra_pkg::*;

  typedef struct { int bank; int offs; } loc_t;

  // ---- PWC: IFM row w (a row of the N_w x N_i matrix), element i ----
  function automatic loc_t pwc_ifm(int w, int i, int ni, int addr_ifm, int R);
    loc_t l; l.bank = w % R; l.offs = addr_ifm + (w / R) * ni + i; return l;
  endfunction
  // ---- PWC: weight column o, element i (V-MEM) ----
  function automatic loc_t pwc_wgt(int o, int i, int ni, int C);
    loc_t l; l.bank = o % C; l.offs = (o / C) * ni + i; return l;
  endfunction
  // ---- output element (row y, column x of the block), H-MEM ----
  function automatic loc_t ofm(int y, int x, int bc, int addr_ofm, int R, int C);
    loc_t l; l.bank = y % R; l.offs = addr_ofm + (y / R) * C * bc + x; return l;
  endfunction
  // ---- DWC any stride: input row rr, column cc ----
  function automatic int gen_block_w(int s, int bc, int k, int C);
    return s * (bc * C - 1) + k;
  endfunction
  function automatic loc_t gen_ifm(int rr, int cc, int s, int k, int bc, int addr_ifm, int R, int C);
    loc_t l; int g; int bw;
    bw = gen_block_w(s, bc, k, C);
    g = rr / s;
    l.bank = g % R;
    l.offs = addr_ifm + (g / R) * s * bw + (rr % s) * bw + cc;
    return l;
  endfunction
  // ---- DWC S = 1: input row rr, column cc ----
  function automatic loc_t s1_ifm(int rr, int cc, int k, int bc, int addr_ifm, int R, int C);
    loc_t l; int bw;
    bw = bc * C + k - 1;
    l.bank = rr % R;
    l.offs = addr_ifm + (rr / R) * bw + cc;
    return l;
  endfunction
  // V-MEM copy for the shift-south step of kernel row i (1..K-1) of tile (tr, tc),
  // column c: element x[tr*R + R-1 + i][tc*C + c + (i odd ? K-1 : 0)].
  function automatic loc_t s1_vmem(int tr, int tc, int i, int c, int k, int bc, int addr_vin);
    loc_t l; l.bank = c; l.offs = addr_vin + (tr * (k - 1) + i - 1) * bc + tc; return l;
  endfunction

  // ---------------- instruction helpers ----------------
  function automatic pe_instr_t nop();
    pe_instr_t x; x = '0; return x;
  endfunction
  function automatic pe_instr_t mac(srca_e a, srcb_e b);
    pe_instr_t x; x = '0; x.op = OP_MAC; x.src_a = a; x.src_b = b; return x;
  endfunction
  // write-back: drive OutReg as store data, then clear it
  function automatic pe_instr_t wb();
    pe_instr_t x; x = '0; x.op = OP_CLR; x.db = 1'b1; return x;
  endfunction
  // pass own OutA on: register 0 <= OutA of neighbour d
  function automatic pe_instr_t take(pe_instr_t x, dir_e d);
    x.wr_en = 1'b1; x.wr_reg = 2'd0; x.wr_src = 1'b1; x.in_opnd = d; return x;
  endfunction
endpackage
