// instr_decoder: the instruction decoder of the ROPE processor.
//
// Every cycle the active pre-fetch unit drives one instruction on the
// instruction bus. It carries a data op (vertical microcode for one
// functional unit) and a control op for the pre-fetch ring: NEXT (nothing to
// do; the ring passes the activate token on by itself), PRE-FETCH (start a
// target fetch on the unit picked by the low address bits, storing a jump
// label and condition mask) or JUMP (broadcast a label; the target whose
// mask matches the condition bits runs next).
//
// The instruction issues when it is valid and the processor is not frozen;
// all strobes that change state (`*_valid`, `prefetch`, `jump`) are
// qualified by `issue`. The memory request `mem_req` is the only exception:
// it is raised for a valid memory instruction whether or not it issues,
// because the memory interface takes it only when not frozen. Purely
// combinational. The field layout and opcodes are this design's own.
module instr_decoder
  import rope_pkg::*;
(
  input  instr_t              instr,
  input  logic                instr_valid,
  input  logic                freeze,
  output logic                issue,
  // register operands
  output logic [RIDX_W-1:0]   rd,
  output logic [RIDX_W-1:0]   ra,
  output logic [RIDX_W-1:0]   rb,
  output logic [RIDX_W-1:0]   rc,          // register holding a PRE-FETCH address
  output logic [XLEN-1:0]     imm,         // sign-extended immediate
  // one-cycle moves
  output logic                mv_valid,
  output dop_e                mv_op,       // D_MOV, D_LDI or D_RDIP
  // integer unit
  output logic                alu_valid,
  output aluop_e              alu_op,
  output logic                alu_b_imm,
  // floating-point adder
  output logic                fadd_valid,
  output logic                fadd_sub,
  output logic                fadd_lt,
  output logic                fadd_gt,
  // floating-point multiplier
  output logic                fmul_valid,
  // memory
  output logic                mem_req,
  output logic                mem_we,
  // control op
  output logic                prefetch,
  output logic                prefetch_from_reg,
  output logic [IADDR_W-1:0]  prefetch_addr,
  output logic [LABEL_W-1:0]  prefetch_label,
  output cmask_t              prefetch_mask,
  output logic                jump,
  output logic [LABEL_W-1:0]  jump_label
);

  dataop_t d;
  ctrlop_t c;

  assign d     = instr.d;
  assign c     = instr.c;
  assign issue = instr_valid && !freeze;

  assign rd  = d.rd;
  assign ra  = d.ra;
  assign rb  = d.rb;
  assign rc  = c.addr[RIDX_W-1:0];
  assign imm = XLEN'(signed'(d.imm));

  always_comb begin
    mv_valid   = 1'b0;
    mv_op      = d.op;
    alu_valid  = 1'b0;
    alu_op     = A_ADD;
    alu_b_imm  = 1'b0;
    fadd_valid = 1'b0;
    fadd_sub   = 1'b0;
    fadd_lt    = 1'b0;
    fadd_gt    = 1'b0;
    fmul_valid = 1'b0;
    mem_req    = 1'b0;
    mem_we     = 1'b0;
    unique case (d.op)
      D_MOV, D_LDI, D_RDIP: mv_valid = issue;
      D_ADD:  begin alu_valid = issue; alu_op = A_ADD; end
      D_SUB:  begin alu_valid = issue; alu_op = A_SUB; end
      D_ADDI: begin alu_valid = issue; alu_op = A_ADD; alu_b_imm = 1'b1; end
      D_AND:  begin alu_valid = issue; alu_op = A_AND; end
      D_OR:   begin alu_valid = issue; alu_op = A_OR;  end
      D_XOR:  begin alu_valid = issue; alu_op = A_XOR; end
      D_TLT:  begin alu_valid = issue; alu_op = A_TLT; end
      D_TGT:  begin alu_valid = issue; alu_op = A_TGT; end
      D_TEQ:  begin alu_valid = issue; alu_op = A_TEQ; end
      D_FADD: fadd_valid = issue;
      D_FSUB: begin fadd_valid = issue; fadd_sub = 1'b1; end
      D_FTLT: begin fadd_valid = issue; fadd_lt = 1'b1; end
      D_FTGT: begin fadd_valid = issue; fadd_gt = 1'b1; end
      D_FMUL: fmul_valid = issue;
      D_LD:   mem_req = instr_valid;
      D_ST:   begin mem_req = instr_valid; mem_we = 1'b1; end
      default: ;
    endcase
  end

  assign prefetch          = issue && (c.op == C_PREFETCH);
  assign prefetch_from_reg = c.from_reg;
  assign prefetch_addr     = c.addr;
  assign prefetch_label    = c.label;
  assign prefetch_mask     = c.mask;
  assign jump              = issue && (c.op == C_JUMP);
  assign jump_label        = c.label;

endmodule
