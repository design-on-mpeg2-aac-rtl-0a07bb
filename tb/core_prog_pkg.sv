// core_prog_pkg: builders of control words for the DSP core, used by the
// testbenches to write short programs.
package core_prog_pkg;
  import aac_pkg::*;

  // load RSn / RDn / MPDn with a constant (imm -> bus A -> bus C -> ACU)
  function automatic ctrl_word_t w_acu(acu_ld_e kind, int idx, int value);
    ctrl_word_t w = CTRL_NOP;
    w.a_src = A_IMM; w.imm = 32'(value); w.c_src = C_BUSA;
    w.acu_ld = kind; w.acu_idx = 2'(idx);
    return w;
  endfunction

  // write a constant to memory A or B at RSp, post-increment
  function automatic ctrl_word_t w_store_imm(bit to_b, int p, logic [31:0] value);
    ctrl_word_t w = CTRL_NOP;
    w.a_src = A_IMM; w.imm = value; w.c_src = C_BUSA;
    w.cpl.en = 1'b1; w.cpl.ptr = 2'(p); w.cpl.post = 1'b1;
    w.wr_a = !to_b; w.wr_b = to_b;
    return w;
  endfunction

  // issue reads: memory A at RSpa (optionally bit-reversed), memory B at RSpb
  function automatic ctrl_word_t w_read(bit ra, int pa, bit brev, bit rb, int pb);
    ctrl_word_t w = CTRL_NOP;
    w.apl.en = ra; w.apl.ptr = 2'(pa); w.apl.post = ra; w.apl.brev = brev;
    w.bpl.en = rb; w.bpl.ptr = 2'(pb); w.bpl.post = rb;
    return w;
  endfunction

  // bus A <- word read last cycle, bus C <- bus A; optionally write it at RSp
  function automatic ctrl_word_t w_move_mem(bit wr, bit to_b, int p);
    ctrl_word_t w = CTRL_NOP;
    w.a_src = A_MEM; w.c_src = C_BUSA;
    w.cpl.en = wr; w.cpl.ptr = 2'(p); w.cpl.post = wr;
    w.wr_a = wr && !to_b; w.wr_b = wr && to_b;
    return w;
  endfunction

  // merge two control words whose used fields do not overlap
  function automatic ctrl_word_t w_or(ctrl_word_t x, ctrl_word_t y);
    return ctrl_word_t'(x | y);
  endfunction
endpackage
