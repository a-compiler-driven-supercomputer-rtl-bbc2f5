// rope_top: the ROPE (Ring Of Pre-fetch Elements) processor.
//
// One instruction issues per cycle. Its control op drives the ring of
// pre-fetch units (prefetch_ring), which fetches straight-line code ahead
// of execution with start-fetch tokens and keeps the targets of multi-way
// jumps ready; its data op goes to one of the fully pipelined functional
// units: a one-cycle move path, the integer unit (2 cycles), the
// floating-point adder (4) and multiplier (4), and the memory interface
// (6 cycles, hashed multi-bank data memory). Results are written to the
// register file, tests to the condition bits, a fixed number of cycles
// after issue. Nothing checks dependencies: the compiler schedules every
// operation for its known latency.
//
// The only hold-up is the freeze, raised when the active pre-fetch unit has
// not finished its fetch (`ring_stall`) or when a memory request finds its
// bank busy (`mem_freeze`). A freeze stops issue, the activate token
// and every functional-unit pipeline, so the static schedule stays valid;
// start-fetch tokens, instruction fetches and bank busy times keep running.
//
// Interfaces: the program-reload bus writes instruction memory (use it
// while rst_n is low); the host data port and the register read port are
// where the service processors, which this design does not include, would
// load data and read results. Observation outputs count issue and freezes.
// Reset starts execution at instruction address 0.
module rope_top
  import rope_pkg::*;
#(
  parameter int unsigned NUNITS      = 32,
  parameter int unsigned NBANKS      = 8,
  parameter int unsigned BANK_BUSY   = 4,
  parameter bit          HASH        = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // external program-reload bus
  input  logic                 load_we,
  input  logic [IADDR_W-1:0]   load_addr,
  input  instr_t               load_data,
  // host data port
  input  logic                 host_we,
  input  logic [DADDR_W-1:0]   host_addr,
  input  logic [XLEN-1:0]      host_wdata,
  output logic [XLEN-1:0]      host_rdata,
  // host register read port
  input  logic [RIDX_W-1:0]    dbg_reg,
  output logic [XLEN-1:0]      dbg_reg_value,
  // observation
  output logic                 issue,
  output logic [IADDR_W-1:0]   issue_addr,
  output logic                 ring_stall,
  output logic                 mem_freeze,
  output logic                 jump_taken,
  output logic [NCOND-1:0]     condition,
  output logic [NUNITS-1:0]    unit_target,
  output logic [NUNITS-1:0]    unit_fetch_start,
  output logic [31:0]          issue_count
);

  logic        freeze, en;
  instr_t      instr;
  logic        instr_valid;
  logic [IADDR_W-1:0] instr_addr;
  logic [NUNITS-1:0]  unit_busy, unit_active;

  // decoder outputs
  logic [RIDX_W-1:0] rd, ra, rb, rc;
  logic [XLEN-1:0]   imm;
  logic              mv_valid, alu_valid, alu_b_imm;
  dop_e              mv_op;
  aluop_e            alu_op;
  logic              fadd_valid, fadd_sub, fadd_lt, fadd_gt, fmul_valid;
  logic              mem_req, mem_we;
  logic              prefetch, prefetch_from_reg, jump;
  logic [IADDR_W-1:0] prefetch_addr_imm, prefetch_addr;
  logic [LABEL_W-1:0] prefetch_label, jump_label;
  cmask_t            prefetch_mask;

  // register file
  localparam int unsigned NRP = 4, NWP = 5;
  logic [RIDX_W-1:0] rf_raddr [NRP];
  logic [XLEN-1:0]   rf_rdata [NRP];
  logic [NWP-1:0]    rf_we;
  logic [RIDX_W-1:0] rf_waddr [NWP];
  logic [XLEN-1:0]   rf_wdata [NWP];
  logic [XLEN-1:0]   va, vb, vc;

  // functional unit results
  logic              alu_ov, alu_ot, fadd_ov, fadd_ot, fmul_ov, ld_valid;
  logic [RIDX_W-1:0] alu_ord, fadd_ord, fmul_ord, ld_rd;
  logic [XLEN-1:0]   alu_res, fadd_res, fmul_res, ld_data;
  logic [IADDR_W-1:0] ip;

  // condition bits
  logic [1:0]        cb_we;
  logic [CIDX_W-1:0] cb_idx [2];
  logic [1:0]        cb_val;

  assign freeze = ring_stall || mem_freeze;
  assign en     = !freeze;

  // ---------------- instruction controller ----------------
  prefetch_ring #(.NUNITS(NUNITS), .AW(IADDR_W), .WORD_W(INSTR_W), .LATENCY(LAT_IFETCH)) u_ring (
    .clk, .rst_n,
    .freeze          (freeze),
    .prefetch        (prefetch),
    .prefetch_addr   (prefetch_addr),
    .prefetch_label  (prefetch_label),
    .prefetch_mask   (prefetch_mask),
    .jump            (jump),
    .jump_label      (jump_label),
    .condition_bits  (condition),
    .instruction     (instr),
    .instr_valid     (instr_valid),
    .instr_addr      (instr_addr),
    .stall           (ring_stall),
    .load_we         (load_we),
    .load_addr       (load_addr),
    .load_data       (load_data),
    .unit_busy       (unit_busy),
    .unit_target     (unit_target),
    .unit_active     (unit_active),
    .unit_fetch_start(unit_fetch_start)
  );

  instr_decoder u_dec (
    .instr, .instr_valid, .freeze, .issue,
    .rd, .ra, .rb, .rc, .imm,
    .mv_valid, .mv_op,
    .alu_valid, .alu_op, .alu_b_imm,
    .fadd_valid, .fadd_sub, .fadd_lt, .fadd_gt,
    .fmul_valid,
    .mem_req, .mem_we,
    .prefetch, .prefetch_from_reg,
    .prefetch_addr (prefetch_addr_imm),
    .prefetch_label, .prefetch_mask,
    .jump, .jump_label
  );

  // PRE-FETCH address: a constant, or a register value (procedure return)
  assign prefetch_addr = prefetch_from_reg ? vc[IADDR_W-1:0] : prefetch_addr_imm;
  assign jump_taken    = jump;
  assign issue_addr    = instr_addr;

  instr_pointer #(.AW(IADDR_W)) u_ip (
    .clk, .rst_n, .issue, .addr(instr_addr), .ip, .count(issue_count)
  );

  // ---------------- data path ----------------
  assign rf_raddr[0] = ra;
  assign rf_raddr[1] = rb;
  assign rf_raddr[2] = rc;
  assign rf_raddr[3] = dbg_reg;
  assign va = rf_rdata[0];
  assign vb = rf_rdata[1];
  assign vc = rf_rdata[2];
  assign dbg_reg_value = rf_rdata[3];

  // port 0: one-cycle moves
  assign rf_we[0]    = mv_valid;
  assign rf_waddr[0] = rd;
  always_comb begin
    unique case (mv_op)
      D_LDI:   rf_wdata[0] = imm;
      D_RDIP:  rf_wdata[0] = XLEN'(ip);
      default: rf_wdata[0] = va;
    endcase
  end
  // ports 1-4: pipelined units, written when the pipeline advances
  assign rf_we[1]    = en && alu_ov && !alu_ot;
  assign rf_waddr[1] = alu_ord;
  assign rf_wdata[1] = alu_res;
  assign rf_we[2]    = en && fadd_ov && !fadd_ot;
  assign rf_waddr[2] = fadd_ord;
  assign rf_wdata[2] = fadd_res;
  assign rf_we[3]    = en && fmul_ov;
  assign rf_waddr[3] = fmul_ord;
  assign rf_wdata[3] = fmul_res;
  assign rf_we[4]    = en && ld_valid;
  assign rf_waddr[4] = ld_rd;
  assign rf_wdata[4] = ld_data;

  regfile #(.N(NREG), .W(XLEN), .NR(NRP), .NW(NWP)) u_rf (
    .clk, .rst_n,
    .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  int_alu u_alu (
    .clk, .rst_n, .en,
    .in_valid (alu_valid),
    .op       (alu_op),
    .a        (va),
    .b        (alu_b_imm ? imm : vb),
    .rd       (rd),
    .out_valid(alu_ov),
    .out_test (alu_ot),
    .out_rd   (alu_ord),
    .result   (alu_res)
  );

  fp_add u_fadd (
    .clk, .rst_n, .en,
    .in_valid (fadd_valid),
    .sub      (fadd_sub),
    .test_lt  (fadd_lt),
    .test_gt  (fadd_gt),
    .a        (va),
    .b        (vb),
    .rd       (rd),
    .out_valid(fadd_ov),
    .out_test (fadd_ot),
    .out_rd   (fadd_ord),
    .result   (fadd_res)
  );

  fp_mul u_fmul (
    .clk, .rst_n, .en,
    .in_valid (fmul_valid),
    .a        (va),
    .b        (vb),
    .rd       (rd),
    .out_valid(fmul_ov),
    .out_rd   (fmul_ord),
    .result   (fmul_res)
  );

  assign cb_we[0]  = en && alu_ov && alu_ot;
  assign cb_idx[0] = alu_ord[CIDX_W-1:0];
  assign cb_val[0] = alu_res[0];
  assign cb_we[1]  = en && fadd_ov && fadd_ot;
  assign cb_idx[1] = fadd_ord[CIDX_W-1:0];
  assign cb_val[1] = fadd_res[0];

  cond_bits #(.N(NCOND), .NW(2)) u_cond (
    .clk, .rst_n, .we(cb_we), .idx(cb_idx), .value(cb_val), .bits(condition)
  );

  mem_interface #(
    .AW(DADDR_W), .NBANKS(NBANKS), .BUSY_CYCLES(BANK_BUSY), .LATENCY(LAT_MEM), .HASH(HASH)
  ) u_mem (
    .clk, .rst_n, .en,
    .req_valid (mem_req),
    .req_we    (mem_we),
    .req_addr  (va[DADDR_W-1:0]),
    .req_wdata (vb),
    .req_rd    (rd),
    .mem_freeze(mem_freeze),
    .ld_valid  (ld_valid),
    .ld_rd     (ld_rd),
    .ld_data   (ld_data),
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .bank_busy ()
  );

endmodule
