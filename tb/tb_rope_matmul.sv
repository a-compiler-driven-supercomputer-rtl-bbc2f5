// tb_rope_matmul: single-precision matrix multiplication C = A * B of two
// N x N matrices (N = 4) on the whole ROPE processor at its default
// parameters, a loop nest that keeps the FP multiplier and adder pipelines
// busy.
//
// The program holds one row of A in registers a0..a3 and computes one
// element of C per iteration of the column loop J = 64 (26 instructions,
// units 0..25): four loads down a column of B, four FMULs, an FADD tree
// ((a0*b0 + a1*b1) + (a2*b2 + a3*b3)) and a store, with the loads of the
// next operands overlapping the arithmetic. Every iteration ends with a
// two-way JUMP (label 0) back to J or, after the last column, to XI = 90
// (units 26..31), which jumps (label 1) to the row block R = 33 (units
// 1..12). R loads the next row of A and makes a two-way jump (label 1) to J
// or, after the last row, to the halt loop D = 48. Addressing uses only
// pointer increments; the store pointer is advanced at the start of the
// next iteration, so the store and the loop's JUMP share the last
// instruction.
//
// Checks, on three random matrix pairs: every element of C equals a
// reference that rounds each product and each sum to single precision
// (round to nearest even); every column iteration takes exactly 26 cycles;
// the jump outcomes match the loop counts; the halt loop is reached. The
// column loads of B (stride N) sometimes meet a busy bank: such iterations
// must take 26 cycles plus exactly the counted bank-conflict freeze, and
// at least one must occur. No instruction-fetch freeze is allowed.
module tb_rope_matmul;
  import rope_pkg::*;
  import rope_asm_pkg::*;

  localparam int N  = 4;
  localparam int BA = 'h400, BB = 'h440, BC = 'h480;
  localparam int R = 33, D = 48, J = 64, XI = 90;
  localparam int ITER = 26;
  // registers
  localparam int PA = 1, PB = 2, PC = 3, PAEND = 4, PBEND = 5;
  localparam int A0 = 10, B0 = 14, M0 = 18, T1 = 22, T2 = 23, T3 = 24, S0 = 25, S1 = 26, S = 27;

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
  logic [31:0] ma [N][N], mb [N][N], mc [N][N];
  int checks = 0, failures = 0;
  int n_slow_iter = 0, n_j = 0, n_xi = 0, n_r = 0, n_d = 0, n_fetch_freeze = 0, n_memfreeze = 0, bad_gap = 0;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic real s2r(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 0) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // double to single, round to nearest even (operands stay in the normal range)
  function automatic logic [31:0] r2s(real r);
    logic [63:0] d; logic [52:0] m; logic [23:0] mm; int e; logic g, st;
    d = $realtobits(r);
    if (d[62:52] == 0) return 32'd0;
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mm = m[52:29]; g = m[28]; st = |m[27:0];
    if (g && (st || mm[0])) begin
      if (mm == 24'hFFFFFF) begin mm = 24'h800000; e++; end else mm++;
    end
    return {d[63], 8'(e), mm[22:0]};
  endfunction

  initial begin
    for (int i = 0; i < 128; i++) prog[i] = nop();
    // prolog
    prog[0] = ins(D_LDI, PA, 0, 0, BA - N);
    prog[1] = ins(D_LDI, PC, 0, 0, BC - 1);
    prog[2] = ins(D_LDI, PAEND, 0, 0, BA + N * N);
    prog[3] = ins(D_LDI, PBEND, 0, 0, BB + N);
    prog[4] = pf(nop(), R, 1, 0, 0);
    prog[9] = jmp(nop(), 1);
    // R: next row of A
    prog[R+0]  = ins(D_ADDI, PA, PA, 0, N);
    prog[R+1]  = ins(D_LDI, PB, 0, 0, BB);
    prog[R+2]  = ins(D_LD, A0 + 0, PA);
    prog[R+3]  = ins(D_ADDI, T1, PA, 0, 1);
    prog[R+4]  = pf(ins(D_ADDI, T2, PA, 0, 2), J, 1, 'b100, 'b000);
    prog[R+5]  = pf(ins(D_LD, A0 + 1, T1), D, 1, 'b100, 'b100);
    prog[R+6]  = ins(D_LD, A0 + 2, T2);
    prog[R+7]  = ins(D_ADDI, T3, PA, 0, 3);
    prog[R+8]  = ins(D_TEQ, 2, PA, PAEND);        // c2: all rows done
    prog[R+9]  = ins(D_LD, A0 + 3, T3);
    prog[R+11] = jmp(nop(), 1);
    // D: halt loop
    prog[D+0]  = pf(nop(), D, 2, 0, 0);
    prog[D+5]  = jmp(nop(), 2);
    // J: one element of C
    prog[J+0]  = pf(ins(D_LD, B0 + 0, PB), J, 0, 'b010, 'b000);
    prog[J+1]  = pf(ins(D_ADDI, T1, PB, 0, N), XI, 0, 'b010, 'b010);
    prog[J+2]  = ins(D_ADDI, PC, PC, 0, 1);
    prog[J+3]  = ins(D_LD, B0 + 1, T1);
    prog[J+4]  = ins(D_ADDI, T2, PB, 0, 2 * N);
    prog[J+5]  = ins(D_ADDI, T3, PB, 0, 3 * N);
    prog[J+6]  = ins(D_LD, B0 + 2, T2);
    prog[J+7]  = ins(D_LD, B0 + 3, T3);
    prog[J+8]  = ins(D_ADDI, PB, PB, 0, 1);
    prog[J+9]  = ins(D_FMUL, M0 + 0, A0 + 0, B0 + 0);
    prog[J+10] = ins(D_FMUL, M0 + 1, A0 + 1, B0 + 1);
    prog[J+11] = ins(D_TEQ, 1, PB, PBEND);        // c1: last column
    prog[J+12] = ins(D_FMUL, M0 + 2, A0 + 2, B0 + 2);
    prog[J+13] = ins(D_FMUL, M0 + 3, A0 + 3, B0 + 3);
    prog[J+14] = ins(D_FADD, S0, M0 + 0, M0 + 1);
    prog[J+17] = ins(D_FADD, S1, M0 + 2, M0 + 3);
    prog[J+21] = ins(D_FADD, S, S0, S1);
    prog[J+25] = jmp(ins(D_ST, 0, PC, S), 0);
    // XI: after the last column
    prog[XI+0] = pf(nop(), R, 1, 0, 0);
    prog[XI+5] = jmp(nop(), 1);
  end

  int cyc = 0, first_issue = -1, reach_d = -1, last_j = -1, mf_at_j = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mem_freeze) n_memfreeze++;
    if (ring_stall && first_issue >= 0 && reach_d < 0) n_fetch_freeze++;
    if (issue) begin
      if (first_issue < 0) first_issue = cyc;
      case (int'(issue_addr))
        J: begin
          n_j++;
          // a bank conflict may freeze an iteration; nothing else may
          if (last_j >= 0 && cyc - last_j - (n_memfreeze - mf_at_j) != ITER) begin
            bad_gap++;
            $display("column iteration took %0d cycles", cyc - last_j);
          end
          if (last_j >= 0 && cyc - last_j != ITER) n_slow_iter++;
          last_j = cyc;
          mf_at_j = n_memfreeze;
        end
        XI: begin n_xi++; last_j = -1; end
        R:  n_r++;
        D:  if (reach_d < 0) begin reach_d = cyc; n_d++; end
        default: ;
      endcase
    end
  end

  task automatic run();
    int j0, xi0, r0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        ma[i][k] = {1'($urandom), 8'($urandom_range(124, 130)), 23'($urandom)};
        mb[i][k] = {1'($urandom), 8'($urandom_range(124, 130)), 23'($urandom)};
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        logic [31:0] p [4];
        for (int k = 0; k < 4; k++) p[k] = r2s(s2r(ma[i][k]) * s2r(mb[k][j]));
        mc[i][j] = r2s(s2r(r2s(s2r(p[0]) + s2r(p[1]))) + s2r(r2s(s2r(p[2]) + s2r(p[3]))));
      end
    j0 = n_j; xi0 = n_xi; r0 = n_r;
    first_issue = -1; reach_d = -1; last_j = -1; bad_gap = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 128; i++) begin
      @(negedge clk); load_we = 1; load_addr = IADDR_W'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;
    for (int i = 0; i < N; i++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk); host_we = 1; host_addr = DADDR_W'(BA + i * N + k); host_wdata = ma[i][k];
        @(negedge clk); host_we = 1; host_addr = DADDR_W'(BB + i * N + k); host_wdata = mb[i][k];
      end
    @(negedge clk); host_we = 0;
    rst_n = 1;
    wait (reach_d >= 0);
    repeat (10) @(posedge clk);
    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        host_addr = DADDR_W'(BC + i * N + j); #1;
        chk(host_rdata == mc[i][j], $sformatf("C[%0d][%0d] = %h expected %h", i, j, host_rdata, mc[i][j]));
      end
    chk(n_j - j0 == N * N, $sformatf("%0d column iterations", n_j - j0));
    chk(n_xi - xi0 == N, "one row exit per row");
    chk(n_r - r0 == N + 1, "row block entered once per row and once to finish");
    chk(bad_gap == 0, "every column iteration takes 26 cycles plus its bank-conflict freezes");
    $display("cycles=%0d for %0d elements of C (%0d multiply-adds), fetch freeze cycles so far %0d",
             reach_d - first_issue, N * N, N * N * N, n_fetch_freeze);
  endtask

  initial begin
    run();
    run();
    run();
    $display("mechanisms: ->J=%0d ->XI=%0d ->R=%0d halt=%0d fetch_freeze=%0d mem_freeze=%0d frozen_iterations=%0d",
             n_j, n_xi, n_r, n_d, n_fetch_freeze, n_memfreeze, n_slow_iter);
    chk(n_d == 3, "halt reached in every run");
    chk(n_j > 0 && n_xi > 0 && n_r > 0, "both outcomes of both loop jumps seen");
    chk(n_memfreeze > 0 && n_slow_iter > 0, "bank-conflict freeze inside the loop seen");
    chk(n_fetch_freeze == 0, "no instruction-fetch freeze after the first issue");
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
