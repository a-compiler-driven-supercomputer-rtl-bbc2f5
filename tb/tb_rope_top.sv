// tb_rope_top: end-to-end run of the ROPE processor at its default
// parameters (32 pre-fetch units, 8 hashed data banks) on Livermore loop 24:
// find the location m of the minimum of x[1..n] (first one on ties).
//
// The program, written for this machine's latencies:
//   0..15   prolog: constants, xm = x[1], m-pointer, RDIP, k = 2
//   16..26  loop L: load x[k]; k++; pre-fetch the four targets of one
//           four-way jump under label 0; test c1 = (k > n) and
//           c0 = (x[k] < xm); JUMP 0 in the 11th cycle
//             L  (continue)      mask !c1 && !c0
//             U  = 27 (update)   mask !c1 &&  c0  (6 instr., JUMP 1 back to L,
//                                                 crossing unit 31 -> unit 0)
//             XU = 33 (update, then fall into exit) mask c1 && c0
//             X  = 35 (exit)     mask c1 && !c0
//   35..41  exit: store xm and m (the second and third stores hit one bank,
//           so the memory freezes), x*x and x+x through the FP units,
//           pre-fetch the halt loop from a register, JUMP 2
//   42..47  halt loop H: stores FP results, jumps to itself
// Checks: the results in data memory against a reference computed here;
// the exact cycle count from the first issue to reaching H (16 + 11 per
// iteration + 6 per update + 2 for an update on the last element + 7 exit
// instructions + 3 freeze cycles); every mechanism seen at least once: the
// boot fetch freeze, a memory-bank freeze, each of the four jump outcomes,
// a PRE-FETCH of an address already held (no refetch), issue across the
// ring wrap, PRE-FETCH from a register, RDIP. No freeze may occur inside the
// loop.
module tb_rope_top;
  import rope_pkg::*;
  import rope_asm_pkg::*;

  localparam int N     = 40;       // array length
  localparam int BASE  = 'h200;    // x[k] at BASE + k
  localparam int RES   = 'h100;
  localparam int L = 16, U = 27, XU = 33, X = 35, H = 42;

  logic clk = 0, rst_n = 0;
  logic load_we = 0;
  logic [IADDR_W-1:0] load_addr = 0;
  instr_t load_data = '0;
  logic host_we = 0;
  logic [DADDR_W-1:0] host_addr = 0;
  logic [XLEN-1:0] host_wdata = 0, host_rdata;
  logic [RIDX_W-1:0] dbg_reg = 0;
  logic [XLEN-1:0] dbg_reg_value;
  logic issue, ring_stall, mem_freeze, jump_taken;
  logic [IADDR_W-1:0] issue_addr;
  logic [NCOND-1:0] condition;
  logic [31:0] unit_target, unit_fetch_start;
  logic [31:0] issue_count;

  rope_top dut (.*);
  always #5 clk = ~clk;

  instr_t prog [64];
  logic [31:0] x [1:N];
  int checks = 0, failures = 0;
  // mechanism counters
  int n_boot_stall = 0, n_loop_stall = 0, n_memfreeze = 0, n_jump = 0;
  int n_to_L = 0, n_to_U = 0, n_to_XU = 0, n_to_X = 0, n_same_addr = 0, n_wrap = 0;
  int n_pf_reg = 0, n_rdip = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real s2r(logic [31:0] v);
    logic [63:0] d;
    if (v[30:23] == 0) return 0.0;
    d = {v[31], 11'(int'(v[30:23]) - 127 + 1023), v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  initial begin
    for (int i = 0; i < 64; i++) prog[i] = nop();
    // prolog
    prog[0]  = ins(D_LDI, 1, 0, 0, BASE + 1);
    prog[1]  = ins(D_LDI, 2, 0, 0, BASE + N);
    prog[2]  = ins(D_LDI, 10, 0, 0, RES);
    prog[3]  = ins(D_LDI, 11, 0, 0, RES + 1);
    prog[4]  = ins(D_LDI, 14, 0, 0, RES + 8);
    prog[5]  = ins(D_LDI, 12, 0, 0, H);
    prog[6]  = ins(D_LDI, 15, 0, 0, RES + 2);
    prog[7]  = ins(D_LDI, 16, 0, 0, RES + 3);
    prog[8]  = ins(D_LDI, 17, 0, 0, RES + 4);
    prog[9]  = ins(D_RDIP, 13);
    prog[10] = ins(D_LD, 3, 1);             // xm = x[1]
    prog[11] = ins(D_ADDI, 4, 1, 0, 1);     // m-pointer = &x[1] + 1
    prog[12] = ins(D_ADDI, 1, 1, 0, 1);     // k = 2
    // loop: c0 = bit 0, c1 = bit 1
    prog[L+0]  = pf(ins(D_LD, 5, 1), L, 0, 'b11, 'b00);
    prog[L+1]  = pf(ins(D_ADDI, 1, 1, 0, 1), U, 0, 'b11, 'b01);
    prog[L+2]  = pf(nop(), XU, 0, 'b11, 'b11);
    prog[L+3]  = pf(ins(D_TGT, 1, 1, 2), X, 0, 'b11, 'b10);
    prog[L+6]  = ins(D_FTLT, 0, 5, 3);
    prog[L+10] = jmp(nop(), 0);
    // update
    prog[U+0]  = pf(ins(D_MOV, 3, 5), L, 1, 0, 0);
    prog[U+1]  = ins(D_MOV, 4, 1);
    prog[U+5]  = jmp(nop(), 1);
    // update on the last element, then exit
    prog[XU+0] = ins(D_MOV, 3, 5);
    prog[XU+1] = ins(D_MOV, 4, 1);
    // exit
    prog[X+0]  = pfr(ins(D_ST, 0, 10, 3), 12, 2, 0, 0);
    prog[X+1]  = ins(D_ST, 0, 11, 4);
    prog[X+2]  = ins(D_ST, 0, 14, 4);       // same bank as RES+1: freeze
    prog[X+3]  = ins(D_FMUL, 22, 3, 3);
    prog[X+4]  = ins(D_FADD, 23, 3, 3);
    prog[X+5]  = ins(D_ST, 0, 15, 13);
    prog[X+6]  = jmp(nop(), 2);
    // halt loop
    prog[H+0]  = pf(nop(), H, 2, 0, 0);
    prog[H+1]  = ins(D_ST, 0, 16, 22);
    prog[H+2]  = ins(D_ST, 0, 17, 23);
    prog[H+5]  = jmp(nop(), 2);
  end

  // mechanism monitor
  int cyc = 0, first_issue = -1, reach_h = -1;
  logic [IADDR_W-1:0] last_jump_from;
  logic after_jump = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (ring_stall && first_issue < 0) n_boot_stall++;
    if (ring_stall && first_issue >= 0 && reach_h < 0) n_loop_stall++;
    if (mem_freeze) n_memfreeze++;
    if (issue) begin
      if (first_issue < 0) first_issue = cyc;
      if (after_jump && last_jump_from == IADDR_W'(L + 10)) begin
        case (int'(issue_addr))
          L: n_to_L++; U: n_to_U++; XU: n_to_XU++; X: n_to_X++;
          default: begin failures++; $display("jump to unexpected %0d", issue_addr); end
        endcase
      end
      after_jump = jump_taken;
      if (jump_taken) begin n_jump++; last_jump_from = issue_addr; end
      if (issue_addr == IADDR_W'(L) && !unit_fetch_start[L]) n_same_addr++;
      if (issue_addr[4:0] == 5'd0 && issue_addr != 0) n_wrap++;
      if (issue_addr == IADDR_W'(X)) n_pf_reg++;
      if (issue_addr == IADDR_W'(9)) n_rdip++;
      if (issue_addr == IADDR_W'(H) && reach_h < 0) reach_h = cyc;
    end
  end

  task automatic run(input bit last_is_min);
    int m, exp_cycles, updates;
    int j0, jU0, jXU0, jX0, jL0;
    logic [31:0] xm;
    // random array, with a few repeated values
    for (int k = 1; k <= N; k++) begin
      x[k] = {1'($urandom), 8'($urandom_range(120, 135)), 23'($urandom)};
      if (k > 3 && $urandom_range(0, 7) == 0) x[k] = x[k-2];
    end
    if (last_is_min) x[N] = 32'hC700_0000;   // -32768.0, below every other value
    jL0 = n_to_L; jU0 = n_to_U; jXU0 = n_to_XU; jX0 = n_to_X;
    n_memfreeze = 0; n_loop_stall = 0; first_issue = -1; reach_h = -1; after_jump = 0;
    // reference: first location of the minimum, and the update count
    m = 1; updates = 0; exp_cycles = 16 + 7 + 3;
    for (int k = 2; k <= N; k++) begin
      exp_cycles += 11;
      if (s2r(x[k]) < s2r(x[m])) begin
        m = k; updates++;
        exp_cycles += (k == N) ? 2 : 6;
      end
    end
    xm = x[m];
    // load program and data while in reset
    rst_n = 0;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); load_we = 1; load_addr = IADDR_W'(a); load_data = prog[a];
    end
    @(negedge clk); load_we = 0;
    for (int k = 1; k <= N; k++) begin
      @(negedge clk); host_we = 1; host_addr = DADDR_W'(BASE + k); host_wdata = x[k];
    end
    @(negedge clk); host_we = 0;
    rst_n = 1;
    wait (reach_h >= 0);
    repeat (20) @(posedge clk);
    @(negedge clk);
    host_addr = DADDR_W'(RES); #1;
    chk(host_rdata == xm, $sformatf("xm: got %h expected %h", host_rdata, xm));
    host_addr = DADDR_W'(RES + 1); #1;
    chk(host_rdata == 32'(BASE + m + 1), $sformatf("m: got %0d expected %0d", int'(host_rdata) - BASE - 1, m));
    host_addr = DADDR_W'(RES + 8); #1;
    chk(host_rdata == 32'(BASE + m + 1), "second copy of m");
    host_addr = DADDR_W'(RES + 2); #1;
    chk(host_rdata == 32'd8, $sformatf("RDIP value %0d", host_rdata));
    host_addr = DADDR_W'(RES + 3); #1;
    // within half a unit in the last place of the exact product
    chk((s2r(host_rdata) - s2r(xm) * s2r(xm)) <= s2r(xm) * s2r(xm) / 16777216.0 &&
        (s2r(xm) * s2r(xm) - s2r(host_rdata)) <= s2r(xm) * s2r(xm) / 16777216.0,
        $sformatf("xm*xm got %h", host_rdata));
    host_addr = DADDR_W'(RES + 4); #1;
    chk(s2r(host_rdata) == 2.0 * s2r(xm), $sformatf("xm+xm got %h", host_rdata));
    dbg_reg = 6'd1; #1;
    chk(dbg_reg_value == 32'(BASE + N + 1), "final k pointer");
    chk(reach_h - first_issue == exp_cycles,
        $sformatf("cycles first issue -> halt: %0d expected %0d", reach_h - first_issue, exp_cycles));
    chk(n_memfreeze == 3, $sformatf("memory freeze cycles %0d expected 3", n_memfreeze));
    chk(n_loop_stall == 0, $sformatf("%0d fetch freezes after boot", n_loop_stall));
    chk(n_to_L - jL0 + n_to_U - jU0 + n_to_XU - jXU0 + n_to_X - jX0 == N - 1, "one four-way jump per element");
    chk(n_to_U - jU0 + n_to_XU - jXU0 == updates, "update count");
    chk(n_to_XU - jXU0 + n_to_X - jX0 == 1, "exactly one exit");
    chk(last_is_min == (n_to_XU - jXU0 == 1), "exit path matches the data");
    $display("m=%0d updates=%0d cycles=%0d (%0.2f per element)", m, updates, reach_h - first_issue,
             real'(reach_h - first_issue - 26) / (N - 1));
  endtask

  initial begin
    run(0);
    run(1);
    $display("mechanisms: boot_stall=%0d mem_freeze=%0d jumps=%0d ->L=%0d ->U=%0d ->XU=%0d ->X=%0d same_addr_prefetch=%0d wrap=%0d pf_reg=%0d rdip=%0d",
             n_boot_stall, n_memfreeze, n_jump, n_to_L, n_to_U, n_to_XU, n_to_X, n_same_addr, n_wrap, n_pf_reg, n_rdip);
    chk(n_boot_stall > 0, "boot fetch freeze seen");
    chk(n_memfreeze > 0, "memory bank freeze seen");
    chk(n_to_L > 0, "jump to L seen");
    chk(n_to_U > 0, "jump to U seen");
    chk(n_to_XU > 0 && n_to_X > 0, "both exits seen");
    chk(n_same_addr > 0, "pre-fetch of a held address seen");
    chk(n_wrap > 0, "issue across the ring wrap seen");
    chk(n_pf_reg > 0 && n_rdip > 0, "register pre-fetch and RDIP seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
