// tb_rope_bsearch: binary search of K keys in a sorted array of N = 31
// signed integers on the whole ROPE processor at its default parameters, a
// loop whose every iteration ends in a data-dependent four-way jump.
//
// The search is the halving-step form: pos starts one word below the
// array, and at each of the five levels (steps 16, 8, 4, 2, 1) it moves to
// t = pos + step if a[t] <= key. The result is pos, the address of the last
// element not greater than the key (one below the array if there is none).
// The inner loop exists in two copies, entered with the action the previous
// compare asked for:
//   NT = 32 (units 0..12)  previous element <= key: pos = t first
//   NS = 45 (units 13..25) previous element >  key: pos unchanged
// Each copy forms t, loads a[t] and the next step (from a small step table
// in data memory), tests c0 = key < a[t] (integer unit) and c1 = last level,
// and ends with one four-way JUMP (label 0) to NT (!c1 !c0), NS (!c1 c0),
// XT = 58 (c1 !c0) or XS = 93 (c1 c0). The exits store pos into the result
// table and jump (label 1) to the key block O = 3 (units 3..13), which loads
// the next key and makes a two-way jump (label 1) to NT (with t preset one
// below the array) or to the halt loop D = 16. The unit placement is that
// of the bubble-sort program: XS overlaps the start of NT, which costs a
// short fetch freeze at some exits only. The array size, the keys and the
// code layout are this design's own choices.
//
// Checks, for three random arrays and K = 24 keys each (keys equal to
// elements, between elements, below and above the array): every result
// equals a reference search; the number of each jump outcome equals the
// reference; every inner iteration takes 13 cycles plus the cycles frozen
// by data-bank conflicts; the halt loop is reached. The mechanisms counted
// are the four-way and two-way jumps, bank-conflict freezes, fetch freezes
// at exits and issue across the ring wrap.
module tb_rope_bsearch;
  import rope_pkg::*;
  import rope_asm_pkg::*;

  localparam int N = 31, L = 5, K = 24;
  localparam int BASE = 'h500, STAB = 'h5E0, KEYS = 'h600, RES = 'h640;
  localparam int O = 3, D = 16, NT = 32, NS = 45, XT = 58, XS = 93;
  localparam int ITER = 13;
  // registers
  localparam int POS = 1, SP = 2, ST = 3, T = 4, V = 5, KEY = 6, SPEND = 7;
  localparam int KP = 8, RP = 9, KEND = 10;

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
  int a [N], keys [K], res [K];
  int checks = 0, failures = 0;
  int n_nt = 0, n_ns = 0, n_xt = 0, n_xs = 0, n_d = 0, n_wrap = 0;
  int n_exit_stall = 0, n_memfreeze = 0, n_slow_iter = 0, bad_gap = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one copy of the inner loop body; `take` selects the entry action
  task automatic body(input int at, input bit take);
    prog[at+0]  = pf(take ? ins(D_MOV, POS, T) : nop(), NT, 0, 'b011, 'b000);
    prog[at+1]  = pf(ins(D_ADDI, SP, SP, 0, 1), NS, 0, 'b011, 'b001);
    prog[at+2]  = pf(ins(D_ADD, T, POS, ST), XT, 0, 'b011, 'b010);
    prog[at+3]  = pf(ins(D_TEQ, 1, SP, SPEND), XS, 0, 'b011, 'b011);  // c1: last level
    prog[at+4]  = ins(D_LD, V, T);
    prog[at+5]  = ins(D_LD, ST, SP);              // step of the next level
    prog[at+10] = ins(D_TLT, 0, KEY, V);          // c0: a[t] > key
    prog[at+12] = jmp(nop(), 0);
  endtask

  initial begin
    for (int i = 0; i < 128; i++) prog[i] = nop();
    // prolog, falls into O
    prog[0] = ins(D_LDI, KP, 0, 0, KEYS);
    prog[1] = ins(D_LDI, KEND, 0, 0, KEYS + K);
    prog[2] = ins(D_LDI, RP, 0, 0, RES);
    // O: start the search for the next key
    prog[O+0]  = ins(D_LD, KEY, KP);
    prog[O+1]  = ins(D_LDI, T, 0, 0, BASE - 1);   // NT copies it into pos
    prog[O+2]  = ins(D_LDI, SP, 0, 0, STAB);
    prog[O+3]  = ins(D_LDI, ST, 0, 0, (N + 1) / 2);
    prog[O+4]  = pf(ins(D_TEQ, 2, KP, KEND), NT, 1, 'b100, 'b000);
    prog[O+5]  = pf(ins(D_ADDI, KP, KP, 0, 1), D, 1, 'b100, 'b100);
    prog[O+6]  = ins(D_LDI, SPEND, 0, 0, STAB + L);
    prog[O+10] = jmp(nop(), 1);
    // D: halt loop
    prog[D+0]  = pf(nop(), D, 2, 0, 0);
    prog[D+5]  = jmp(nop(), 2);
    // inner loop, two copies
    body(NT, 1'b1);
    body(NS, 1'b0);
    // XT: last element <= key
    prog[XT+0] = pf(ins(D_MOV, POS, T), O, 1, 0, 0);
    prog[XT+2] = ins(D_ST, 0, RP, POS);
    prog[XT+3] = ins(D_ADDI, RP, RP, 0, 1);
    prog[XT+5] = jmp(nop(), 1);
    // XS: last element > key
    prog[XS+0] = pf(nop(), O, 1, 0, 0);
    prog[XS+2] = ins(D_ST, 0, RP, POS);
    prog[XS+3] = ins(D_ADDI, RP, RP, 0, 1);
    prog[XS+5] = jmp(nop(), 1);
  end

  // monitor
  int cyc = 0, first_issue = -1, reach_d = -1, last_head = -1, mf_at_head = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mem_freeze) n_memfreeze++;
    if (ring_stall && first_issue >= 0 && reach_d < 0) n_exit_stall++;
    if (issue) begin
      if (first_issue < 0) first_issue = cyc;
      case (int'(issue_addr))
        NT, NS: begin
          if (int'(issue_addr) == NT) n_nt++; else n_ns++;
          if (last_head >= 0 && cyc - last_head - (n_memfreeze - mf_at_head) != ITER) begin
            bad_gap++;
            $display("inner iteration took %0d cycles", cyc - last_head);
          end
          if (last_head >= 0 && cyc - last_head != ITER) n_slow_iter++;
          last_head = cyc;
          mf_at_head = n_memfreeze;
        end
        XT: begin n_xt++; last_head = -1; end
        XS: begin n_xs++; last_head = -1; end
        O:  last_head = -1;
        D:  if (reach_d < 0) begin reach_d = cyc; n_d++; end
        default: ;
      endcase
      if (issue_addr[4:0] == 5'd0 && issue_addr != 0) n_wrap++;
    end
  end

  task automatic run();
    int ent_nt, ent_ns, ex_t, ex_s, nt0, ns0, xt0, xs0, pos, t;
    // sorted array with repeated values
    a[0] = $urandom_range(0, 40) - 20;
    for (int i = 1; i < N; i++) a[i] = a[i-1] + $urandom_range(0, 3) * 7;
    for (int k = 0; k < K; k++)
      case (k % 4)
        0: keys[k] = a[$urandom_range(0, N - 1)];
        1: keys[k] = $urandom_range(0, a[N-1] - a[0] + 20) + a[0] - 10;
        2: keys[k] = (k % 8 == 2) ? a[0] - 1 - $urandom_range(0, 5) : a[N-1] + $urandom_range(0, 5);
        default: keys[k] = a[$urandom_range(0, N - 1)] + 1;
      endcase
    // reference search and jump outcomes
    ent_nt = K; ent_ns = 0; ex_t = 0; ex_s = 0;
    for (int k = 0; k < K; k++) begin
      pos = -1;
      for (int s = (N + 1) / 2, l = 0; s > 0; s = s / 2, l++) begin
        t = pos + s;
        if (a[t] <= keys[k]) begin
          pos = t;
          if (l == L - 1) ex_t++; else ent_nt++;
        end else begin
          if (l == L - 1) ex_s++; else ent_ns++;
        end
      end
      res[k] = BASE + pos;
    end
    nt0 = n_nt; ns0 = n_ns; xt0 = n_xt; xs0 = n_xs;
    first_issue = -1; reach_d = -1; last_head = -1; bad_gap = 0;
    // load program and data while in reset
    rst_n = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); load_we = 1; load_addr = IADDR_W'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); host_we = 1; host_addr = DADDR_W'(BASE + i); host_wdata = XLEN'(a[i]);
    end
    for (int l = 1; l < L; l++) begin
      @(negedge clk); host_we = 1; host_addr = DADDR_W'(STAB + l); host_wdata = XLEN'((N + 1) >> (l + 1));
    end
    for (int k = 0; k < K; k++) begin
      @(negedge clk); host_we = 1; host_addr = DADDR_W'(KEYS + k); host_wdata = XLEN'(keys[k]);
    end
    @(negedge clk); host_we = 0;
    rst_n = 1;
    wait (reach_d >= 0);
    repeat (10) @(posedge clk);
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      host_addr = DADDR_W'(RES + k); #1;
      chk(host_rdata == XLEN'(res[k]), $sformatf("key %0d: result %h expected %h", keys[k], host_rdata, res[k]));
    end
    chk(n_nt - nt0 == ent_nt && n_ns - ns0 == ent_ns, "inner loop entries");
    chk(n_xt - xt0 == ex_t && n_xs - xs0 == ex_s, "exits");
    chk(bad_gap == 0, "every inner iteration takes 13 cycles plus its bank-conflict freezes");
    $display("cycles=%0d for %0d searches (%0d levels each)", reach_d - first_issue, K, L);
  endtask

  initial begin
    run();
    run();
    run();
    $display("mechanisms: ->NT=%0d ->NS=%0d ->XT=%0d ->XS=%0d halt=%0d exit_fetch_freeze=%0d mem_freeze=%0d frozen_iterations=%0d wrap=%0d",
             n_nt, n_ns, n_xt, n_xs, n_d, n_exit_stall, n_memfreeze, n_slow_iter, n_wrap);
    chk(n_nt > 0 && n_ns > 0 && n_xt > 0 && n_xs > 0, "all four jump outcomes seen");
    chk(n_d == 3, "halt reached in every run");
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
