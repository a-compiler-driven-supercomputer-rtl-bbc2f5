// tb_instr_decoder: random instructions with random valid/freeze. Every
// data op must select exactly the unit the table below names, every strobe
// must require issue (valid and not frozen) except the memory request,
// which only requires a valid memory instruction, and the control-op fields
// must reach the ring unchanged.
module tb_instr_decoder;
  import rope_pkg::*;
  instr_t instr;
  logic instr_valid, freeze, issue;
  logic [RIDX_W-1:0] rd, ra, rb, rc;
  logic [XLEN-1:0] imm;
  logic mv_valid, alu_valid, alu_b_imm, fadd_valid, fadd_sub, fadd_lt, fadd_gt, fmul_valid;
  logic mem_req, mem_we, prefetch, prefetch_from_reg, jump;
  dop_e mv_op;
  aluop_e alu_op;
  logic [IADDR_W-1:0] prefetch_addr;
  logic [LABEL_W-1:0] prefetch_label, jump_label;
  cmask_t prefetch_mask;
  int checks = 0, failures = 0;

  instr_decoder dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s op=%0d", what, instr.d.op); end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic iss;
      int u;  // expected unit: 0 none 1 mv 2 alu 3 fadd 4 fmul 5 mem
      aluop_e eop;
      instr = {$urandom, $urandom, $urandom};
      instr.d.op = dop_e'($urandom_range(0, 19));
      instr.c.op = cop_e'($urandom_range(0, 2));
      instr_valid = $urandom_range(0, 3) != 0;
      freeze = $urandom_range(0, 3) == 0;
      #1;
      iss = instr_valid && !freeze;
      case (instr.d.op)
        D_MOV, D_LDI, D_RDIP: u = 1;
        D_ADD, D_SUB, D_ADDI, D_AND, D_OR, D_XOR, D_TLT, D_TGT, D_TEQ: u = 2;
        D_FADD, D_FSUB, D_FTLT, D_FTGT: u = 3;
        D_FMUL: u = 4;
        D_LD, D_ST: u = 5;
        default: u = 0;
      endcase
      case (instr.d.op)
        D_SUB: eop = A_SUB; D_AND: eop = A_AND; D_OR: eop = A_OR; D_XOR: eop = A_XOR;
        D_TLT: eop = A_TLT; D_TGT: eop = A_TGT; D_TEQ: eop = A_TEQ; default: eop = A_ADD;
      endcase
      chk(issue == iss, "issue");
      chk(mv_valid == (iss && u == 1), "mv_valid");
      chk(alu_valid == (iss && u == 2), "alu_valid");
      chk(fadd_valid == (iss && u == 3), "fadd_valid");
      chk(fmul_valid == (iss && u == 4), "fmul_valid");
      chk(mem_req == (instr_valid && u == 5), "mem_req");
      if (u == 2) chk(alu_op == eop && alu_b_imm == (instr.d.op == D_ADDI), "alu_op");
      if (u == 3) chk(fadd_sub == (instr.d.op == D_FSUB) && fadd_lt == (instr.d.op == D_FTLT)
                      && fadd_gt == (instr.d.op == D_FTGT), "fadd mode");
      if (u == 5) chk(mem_we == (instr.d.op == D_ST), "mem_we");
      chk(imm == {{16{instr.d.imm[15]}}, instr.d.imm}, "imm");
      chk(rd == instr.d.rd && ra == instr.d.ra && rb == instr.d.rb && rc == instr.c.addr[RIDX_W-1:0], "regs");
      chk(prefetch == (iss && instr.c.op == C_PREFETCH), "prefetch");
      chk(jump == (iss && instr.c.op == C_JUMP), "jump");
      chk(prefetch_addr == instr.c.addr && prefetch_label == instr.c.label && jump_label == instr.c.label
          && prefetch_mask == instr.c.mask && prefetch_from_reg == instr.c.from_reg, "control fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
