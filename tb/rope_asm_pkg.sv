// rope_asm_pkg: helpers that build ROPE instruction words for testbenches.
// `ins` assembles a data op; `pf`, `pfr` and `jmp` add a control op to it.
package rope_asm_pkg;
  import rope_pkg::*;

  function automatic instr_t ins(dop_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    instr_t i;
    i = '0;
    i.d.op  = op;
    i.d.rd  = RIDX_W'(rd);
    i.d.ra  = RIDX_W'(ra);
    i.d.rb  = RIDX_W'(rb);
    i.d.imm = IMM_W'(imm);
    i.c.op  = C_NEXT;
    return i;
  endfunction

  function automatic instr_t nop();
    return ins(D_NOP);
  endfunction

  // PRE-FETCH of a constant address, with jump label and condition mask
  function automatic instr_t pf(instr_t i, int addr, int label, int care, int value);
    i.c.op         = C_PREFETCH;
    i.c.from_reg   = 1'b0;
    i.c.addr       = IADDR_W'(addr);
    i.c.label      = LABEL_W'(label);
    i.c.mask.care  = NCOND'(care);
    i.c.mask.value = NCOND'(value);
    return i;
  endfunction

  // PRE-FETCH of the address held in register `reg`
  function automatic instr_t pfr(instr_t i, int rg, int label, int care, int value);
    i = pf(i, rg, label, care, value);
    i.c.from_reg = 1'b1;
    return i;
  endfunction

  function automatic instr_t jmp(instr_t i, int label);
    i.c.op    = C_JUMP;
    i.c.label = LABEL_W'(label);
    return i;
  endfunction
endpackage
