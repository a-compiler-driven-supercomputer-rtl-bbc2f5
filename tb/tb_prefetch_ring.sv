// tb_prefetch_ring: the full 32-unit ring fetching and sequencing a program
// whose instruction words are their own addresses; the testbench plays the
// decoder. The program is the three-way jump of the architecture's example:
// the instructions at addresses 0, 1 and 2 pre-fetch targets A = 46,
// B = 40 and C = 34 (units 14, 8 and 2) under jump label 1 with masks
// A: !x && !y, B: !x && y, C: x (x = condition bit 0, y = bit 1), and the
// instruction at address 7 jumps on label 1. For each outcome the issued
// address sequence must be 0..7, then the target and straight-line code
// after it, across the wrap from unit 31 to unit 0 (where the high address
// part is incremented). Reset counts as the cycle that started the fetch
// of address 0, so it issues in cycle 5 after the release (cycle 0); from
// then on no cycle may be lost. The run is repeated with the jump at address 6, one cycle before
// target C can be ready: choosing C must then cost exactly one freeze cycle.
module tb_prefetch_ring;
  import rope_pkg::*;
  localparam int N = 32, AW = 16, W = 16, LAT = 6, NISSUE = 60;
  logic clk = 0, rst_n = 0;
  logic prefetch, jump;
  logic [AW-1:0] prefetch_addr;
  logic [LABEL_W-1:0] prefetch_label, jump_label;
  cmask_t prefetch_mask;
  logic [NCOND-1:0] condition_bits;
  logic [W-1:0] instruction;
  logic instr_valid, stall;
  logic [AW-1:0] instr_addr;
  logic load_we = 0;
  logic [AW-1:0] load_addr = 0;
  logic [W-1:0] load_data = 0;
  logic [N-1:0] unit_busy, unit_target, unit_active, unit_fetch_start;
  int checks = 0, failures = 0;
  int jump_at;

  prefetch_ring #(.NUNITS(N), .AW(AW), .WORD_W(W), .LATENCY(LAT)) dut (
    .freeze(stall), .*);
  always #5 clk = ~clk;

  // the decoder's part
  always_comb begin
    prefetch = 0; jump = 0; prefetch_addr = 0; prefetch_label = 1; jump_label = 1;
    prefetch_mask = '0;
    if (instr_valid && !stall) begin
      case (instruction)
        16'd0: begin prefetch = 1; prefetch_addr = 46; prefetch_mask = '{care: 8'b11, value: 8'b00}; end
        16'd1: begin prefetch = 1; prefetch_addr = 40; prefetch_mask = '{care: 8'b11, value: 8'b10}; end
        16'd2: begin prefetch = 1; prefetch_addr = 34; prefetch_mask = '{care: 8'b01, value: 8'b01}; end
        default: if (instruction == W'(jump_at)) jump = 1;
      endcase
    end
  end

  task automatic run(input int jat, input logic [1:0] xy, input int exp_stalls);
    int target, n, cyc, stalls, first;
    logic [AW-1:0] expect_addr;
    jump_at = jat;
    condition_bits = {6'd0, xy};
    target = xy[0] ? 34 : (xy[1] ? 40 : 46);
    rst_n = 0;
    for (int a = 0; a < 128; a++) begin
      @(negedge clk); load_we = 1; load_addr = AW'(a); load_data = W'(a);
    end
    @(negedge clk); load_we = 0;
    rst_n = 1;
    n = 0; cyc = 1; stalls = 0; first = -1; expect_addr = 0;
    while (n < NISSUE && cyc < 400) begin
      @(negedge clk); #1;
      if (instr_valid && !stall) begin
        checks++;
        if (instruction != W'(expect_addr) || instr_addr != expect_addr) begin
          failures++; $display("jump@%0d xy=%b issue %0d: got %0d expected %0d", jat, xy, n, instruction, expect_addr);
        end
        if (first < 0) first = cyc;
        expect_addr = (expect_addr == AW'(jat)) ? AW'(target) : expect_addr + 1'b1;
        n++;
      end else if (first >= 0) begin
        stalls++;
      end
      cyc++;
    end
    checks++;
    if (first != LAT - 1) begin failures++; $display("first issue in cycle %0d, expected %0d", first, LAT - 1); end
    checks++;
    if (stalls != exp_stalls) begin failures++; $display("jump@%0d xy=%b: %0d lost cycles, expected %0d", jat, xy, stalls, exp_stalls); end
    checks++;
    if (n != NISSUE) begin failures++; $display("only %0d issues", n); end
  endtask

  initial begin
    jump_at = 7; condition_bits = 0;
    repeat (2) @(posedge clk);
    run(7, 2'b00, 0);   // A
    run(7, 2'b10, 0);   // B
    run(7, 2'b01, 0);   // C
    run(7, 2'b11, 0);   // C (y ignored)
    run(6, 2'b00, 0);   // A is ready in time
    run(6, 2'b01, 1);   // C is one cycle late: one freeze cycle
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
