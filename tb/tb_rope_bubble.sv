// tb_rope_bubble: bubble sort of N single-precision numbers on the whole
// ROPE processor at its default parameters (32 pre-fetch units, 8 hashed
// data banks), a program with data-dependent multi-way jumps inside nested
// loops.
//
// The program keeps the running maximum of a pass in a register (cur) and
// stores the smaller of each compared pair behind it, so one pass is one
// load, one compare and one store per element. The inner loop exists in two
// copies, entered with the action that the previous compare asked for:
//   NH = 32 (units 0..12)  previous pair not swapped: store cur, cur = nxt
//   SH = 45 (units 13..25) previous pair swapped: store nxt, keep cur
// Each copy loads the next element, tests c0 = cur > nxt (FP adder) and
// c1 = last pair of the pass (integer unit), and ends with one four-way
// JUMP (label 0) to NH (!c1 !c0), SH (!c1 c0), XN = 58 (c1 !c0) or
// XS = 93 (c1 c0). The two exits finish the pass and jump (label 1) to the
// outer-loop block O = 3 (units 3..13), which shortens the pass, reloads
// a[0] and makes a two-way jump (label 1) back to NH or to the halt loop
// D = 16. Target addresses are placed so that no target sits in the part
// of a code stretch still to be executed; XS overlaps the end of XN and the
// start of NH, which costs a short fetch freeze at some pass exits only.
// Array a[0..N-1] lives at BASE+1..BASE+N; BASE itself is scratch.
//
// Checks, for a random array (with repeated values), a sorted one and a
// reversed one: the memory holds the sorted array; the number of swaps and
// of each jump outcome equals that of a reference bubble sort; every inner
// iteration takes exactly 13 cycles (no freeze inside the inner loop); the
// halt loop is reached. The mechanisms counted are the four-way and two-way
// jumps, PRE-FETCH of an already held address, fetch freezes at pass exits
// and issue across the ring wrap.
module tb_rope_bubble;
  import rope_pkg::*;
  import rope_asm_pkg::*;

  localparam int N    = 24;
  localparam int BASE = 'h300;
  localparam int O = 3, D = 16, NH = 32, SH = 45, XN = 58, XS = 93;
  localparam int ITER = 13;            // cycles per inner iteration
  // registers
  localparam int P = 1, E = 2, CUR = 3, NXT = 5, Q = 6, A0 = 7;

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

  instr_t prog [128];
  logic [31:0] a [N];
  int checks = 0, failures = 0;
  int n_nh = 0, n_sh = 0, n_xn = 0, n_xs = 0, n_d = 0, n_same = 0, n_wrap = 0;
  int n_exit_stall = 0, n_memfreeze = 0, bad_gap = 0;

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

  // one copy of the inner loop body; `swapped` selects the entry action
  task automatic body(input int at, input bit swapped);
    prog[at+0]  = pf(swapped ? ins(D_ST, 0, Q, NXT) : ins(D_ST, 0, Q, CUR), NH, 0, 'b011, 'b000);
    prog[at+1]  = pf(swapped ? nop() : ins(D_MOV, CUR, NXT), SH, 0, 'b011, 'b001);
    prog[at+2]  = pf(ins(D_LD, NXT, P), XN, 0, 'b011, 'b010);
    prog[at+3]  = pf(ins(D_ADDI, Q, Q, 0, 1), XS, 0, 'b011, 'b011);
    prog[at+4]  = ins(D_TEQ, 1, P, E);            // c1: last pair of the pass
    prog[at+5]  = ins(D_ADDI, P, P, 0, 1);
    prog[at+8]  = ins(D_FTGT, 0, CUR, NXT);       // c0: swap
    prog[at+12] = jmp(nop(), 0);
  endtask

  initial begin
    for (int i = 0; i < 128; i++) prog[i] = nop();
    // prolog, falls into O
    prog[0] = ins(D_LDI, A0, 0, 0, BASE + 1);
    prog[1] = ins(D_LDI, E, 0, 0, BASE + N + 1);
    // O: start a pass over a[0..end]
    prog[O+0]  = ins(D_ADDI, E, E, 0, -1);
    prog[O+1]  = ins(D_LDI, Q, 0, 0, BASE);       // first store goes to scratch
    prog[O+2]  = ins(D_LDI, P, 0, 0, BASE + 2);
    prog[O+3]  = ins(D_LD, CUR, A0);
    prog[O+4]  = pf(ins(D_TEQ, 2, E, A0), NH, 1, 'b100, 'b000);
    prog[O+5]  = pf(nop(), D, 1, 'b100, 'b100);
    prog[O+9]  = ins(D_MOV, NXT, CUR);
    prog[O+10] = jmp(nop(), 1);
    // D: halt loop
    prog[D+0]  = pf(nop(), D, 2, 0, 0);
    prog[D+5]  = jmp(nop(), 2);
    // inner loop, two copies
    body(NH, 1'b0);
    body(SH, 1'b1);
    // XN: last pair not swapped
    prog[XN+0] = pf(ins(D_ST, 0, Q, CUR), O, 1, 0, 0);
    prog[XN+1] = ins(D_MOV, CUR, NXT);
    prog[XN+2] = ins(D_ADDI, Q, Q, 0, 1);
    prog[XN+4] = ins(D_ST, 0, Q, CUR);
    prog[XN+5] = jmp(nop(), 1);
    // XS: last pair swapped
    prog[XS+0] = pf(ins(D_ST, 0, Q, NXT), O, 1, 0, 0);
    prog[XS+1] = ins(D_ADDI, Q, Q, 0, 1);
    prog[XS+3] = ins(D_ST, 0, Q, CUR);
    prog[XS+5] = jmp(nop(), 1);
  end

  // monitor
  int cyc = 0, first_issue = -1, reach_d = -1, last_head = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mem_freeze) n_memfreeze++;
    if (ring_stall && first_issue >= 0 && reach_d < 0) n_exit_stall++;
    if (issue) begin
      if (first_issue < 0) first_issue = cyc;
      case (int'(issue_addr))
        NH, SH: begin
          if (int'(issue_addr) == NH) n_nh++; else n_sh++;
          if (last_head >= 0 && cyc - last_head != ITER) begin
            bad_gap++;
            $display("inner iteration took %0d cycles", cyc - last_head);
          end
          last_head = cyc;
          if (!unit_fetch_start[issue_addr[4:0]]) n_same++;
        end
        XN: begin n_xn++; last_head = -1; end
        XS: begin n_xs++; last_head = -1; end
        O:  last_head = -1;
        D:  if (reach_d < 0) begin reach_d = cyc; n_d++; end
        default: ;
      endcase
      if (issue_addr[4:0] == 5'd0 && issue_addr != 0) n_wrap++;
    end
  end

  task automatic run(input int kind);
    logic [31:0] r [N];
    logic [31:0] t;
    int swaps, last_swaps, nh0, sh0, xn0, xs0;
    for (int k = 0; k < N; k++) begin
      a[k] = {1'($urandom), 8'($urandom_range(122, 132)), 23'($urandom)};
      if (k > 2 && $urandom_range(0, 5) == 0) a[k] = a[k-3];
    end
    // reference bubble sort
    for (int k = 0; k < N; k++) r[k] = a[k];
    if (kind != 0) begin
      for (int i = N - 1; i > 0; i--)
        for (int j = 0; j < i; j++)
          if ((kind == 1) ? (s2r(r[j]) > s2r(r[j+1])) : (s2r(r[j]) < s2r(r[j+1]))) begin
            t = r[j]; r[j] = r[j+1]; r[j+1] = t;
          end
      for (int k = 0; k < N; k++) a[k] = r[k];   // 1: already sorted, 2: reversed
    end
    swaps = 0; last_swaps = 0;
    for (int i = N - 1; i > 0; i--)
      for (int j = 0; j < i; j++)
        if (s2r(r[j]) > s2r(r[j+1])) begin
          t = r[j]; r[j] = r[j+1]; r[j+1] = t;
          swaps++;
          if (j == i - 1) last_swaps++;
        end
    nh0 = n_nh; sh0 = n_sh; xn0 = n_xn; xs0 = n_xs;
    first_issue = -1; reach_d = -1; last_head = -1; bad_gap = 0;
    // load program and data while in reset
    rst_n = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); load_we = 1; load_addr = IADDR_W'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    for (int k = 0; k < N; k++) begin
      @(negedge clk); host_we = 1; host_addr = DADDR_W'(BASE + 1 + k); host_wdata = a[k];
    end
    @(negedge clk); host_we = 0;
    rst_n = 1;
    wait (reach_d >= 0);
    repeat (10) @(posedge clk);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      host_addr = DADDR_W'(BASE + 1 + k); #1;
      chk(host_rdata == r[k], $sformatf("a[%0d] = %h expected %h", k, host_rdata, r[k]));
    end
    chk(n_sh - sh0 + n_xs - xs0 == swaps, $sformatf("swaps %0d expected %0d", n_sh - sh0 + n_xs - xs0, swaps));
    chk(n_xs - xs0 == last_swaps, "swaps on the last pair of a pass");
    chk(n_xn - xn0 + n_xs - xs0 == N - 1, "one exit per pass");
    chk(n_nh - nh0 + n_sh - sh0 == N * (N - 1) / 2 - (N - 1) + (N - 1), "inner loop entries");
    chk(bad_gap == 0, "every inner iteration takes 13 cycles");
    $display("kind=%0d swaps=%0d cycles=%0d (%0d compares, %0.2f cycles each)", kind, swaps,
             reach_d - first_issue, N * (N - 1) / 2, real'(reach_d - first_issue) / (N * (N - 1) / 2));
  endtask

  initial begin
    run(0);
    run(1);
    run(2);
    $display("mechanisms: ->NH=%0d ->SH=%0d ->XN=%0d ->XS=%0d halt=%0d same_addr_prefetch=%0d exit_fetch_freeze=%0d mem_freeze=%0d wrap=%0d",
             n_nh, n_sh, n_xn, n_xs, n_d, n_same, n_exit_stall, n_memfreeze, n_wrap);
    chk(n_nh > 0 && n_sh > 0 && n_xn > 0 && n_xs > 0, "all four jump outcomes seen");
    chk(n_d == 3, "halt reached in every run");
    chk(n_same > 0, "pre-fetch of a held address seen");
    chk(n_wrap > 0, "issue across the ring wrap seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
