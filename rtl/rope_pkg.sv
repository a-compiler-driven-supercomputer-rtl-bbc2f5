// rope_pkg: types and constants shared by the ROPE processor.
//
// ROPE (Ring Of Pre-fetch Elements) issues one instruction per cycle. Each
// instruction has two halves: a data op for the pipelined data path and a
// control op for the ring of pre-fetch units (NEXT, PRE-FETCH, JUMP). The
// architecture is statically scheduled: every operation has a fixed
// latency that the compiler knows, and there is no interlock hardware apart
// from the freeze raised by a not-yet-fetched instruction or a busy data
// memory bank.
//
// Latencies follow the operation-time table of the architecture: register
// transfer 1 cycle, integer add/compare 2, floating-point add/compare 4,
// indexed data fetch 6, non-sequential instruction fetch 6. The
// floating-point multiply latency, the instruction encoding, the word width
// and the condition-mask coding are this design's own choices.
package rope_pkg;

  // ---- sizes -------------------------------------------------------------
  localparam int unsigned XLEN      = 32;  // data word (IEEE single for FP)
  localparam int unsigned NREG      = 64;  // register file size
  localparam int unsigned RIDX_W    = $clog2(NREG);
  localparam int unsigned NCOND     = 8;   // condition bits
  localparam int unsigned CIDX_W    = $clog2(NCOND);
  localparam int unsigned LABEL_W   = 2;   // jump label ("two or three bits")
  localparam int unsigned IADDR_W   = 16;  // instruction address
  localparam int unsigned DADDR_W   = 16;  // data word address
  localparam int unsigned IMM_W     = 16;

  // ---- latencies (cycles until a dependent instruction may issue) ---------
  localparam int unsigned LAT_MOV   = 1;
  localparam int unsigned LAT_INT   = 2;
  localparam int unsigned LAT_FADD  = 4;
  localparam int unsigned LAT_FMUL  = 4;
  localparam int unsigned LAT_MEM   = 6;
  localparam int unsigned LAT_IFETCH = 6;

  // ---- data ops ------------------------------------------------------------
  typedef enum logic [4:0] {
    D_NOP  = 5'd0,
    D_MOV  = 5'd1,   // rd <= ra                       (1 cycle)
    D_LDI  = 5'd2,   // rd <= sign-extended imm        (1 cycle)
    D_RDIP = 5'd3,   // rd <= instruction pointer      (1 cycle)
    D_ADD  = 5'd4,   // rd <= ra + rb                  (integer unit)
    D_SUB  = 5'd5,   // rd <= ra - rb
    D_ADDI = 5'd6,   // rd <= ra + imm
    D_AND  = 5'd7,
    D_OR   = 5'd8,
    D_XOR  = 5'd9,
    D_TLT  = 5'd10,  // cond[rd] <= (ra <  rb) signed   (integer test)
    D_TGT  = 5'd11,  // cond[rd] <= (ra >  rb) signed
    D_TEQ  = 5'd12,  // cond[rd] <= (ra == rb)
    D_FADD = 5'd13,  // rd <= ra + rb  (FP adder)
    D_FSUB = 5'd14,  // rd <= ra - rb
    D_FTLT = 5'd15,  // cond[rd] <= ra < rb  (FP adder)
    D_FTGT = 5'd16,  // cond[rd] <= ra > rb
    D_FMUL = 5'd17,  // rd <= ra * rb  (FP multiplier)
    D_LD   = 5'd18,  // rd <= mem[ra]
    D_ST   = 5'd19   // mem[ra] <= rb
  } dop_e;

  // ---- control ops ---------------------------------------------------------
  typedef enum logic [1:0] {
    C_NEXT     = 2'd0,
    C_PREFETCH = 2'd1,
    C_JUMP     = 2'd2
  } cop_e;

  // Condition mask: the unit matches when (cond & care) == (value & care).
  typedef struct packed {
    logic [NCOND-1:0] care;
    logic [NCOND-1:0] value;
  } cmask_t;

  typedef struct packed {
    dop_e               op;
    logic [RIDX_W-1:0]  rd;
    logic [RIDX_W-1:0]  ra;
    logic [RIDX_W-1:0]  rb;
    logic [IMM_W-1:0]   imm;
  } dataop_t;

  typedef struct packed {
    cop_e               op;
    logic               from_reg;  // PRE-FETCH address from register addr[RIDX_W-1:0]
    logic [LABEL_W-1:0] label;
    cmask_t             mask;
    logic [IADDR_W-1:0] addr;
  } ctrlop_t;

  typedef struct packed {
    dataop_t d;
    ctrlop_t c;
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Integer unit operation select.
  typedef enum logic [2:0] {
    A_ADD, A_SUB, A_AND, A_OR, A_XOR, A_TLT, A_TGT, A_TEQ
  } aluop_e;

  function automatic logic cmask_match(cmask_t m, logic [NCOND-1:0] c);
    return ((c ^ m.value) & m.care) == '0;
  endfunction

endpackage
