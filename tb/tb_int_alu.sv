// tb_int_alu: random operations through the integer unit, with random
// freezes. Each result is checked against a behavioural model and must
// appear exactly LATENCY-1 enabled cycles after issue (2-cycle integer
// add/compare, written back at the end of the second cycle).
module tb_int_alu;
  import rope_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  aluop_e op;
  logic [31:0] a, b, result;
  logic [RIDX_W-1:0] rd, out_rd;
  logic out_valid, out_test;
  int checks = 0, failures = 0;
  int ecyc = 0;

  typedef struct { logic [31:0] val; logic test; logic [RIDX_W-1:0] rd; int t; } exp_t;
  exp_t q[$];

  int_alu dut (.*);

  always #5 clk = ~clk;

  function automatic exp_t model(aluop_e o, logic [31:0] x, logic [31:0] y, logic [RIDX_W-1:0] r, int t);
    exp_t e; e.rd = r; e.t = t; e.test = 0;
    case (o)
      A_ADD: e.val = x + y;
      A_SUB: e.val = x - y;
      A_AND: e.val = x & y;
      A_OR:  e.val = x | y;
      A_XOR: e.val = x ^ y;
      A_TLT: begin e.test = 1; e.val = {31'd0, $signed(x) < $signed(y)}; end
      A_TGT: begin e.test = 1; e.val = {31'd0, $signed(x) > $signed(y)}; end
      default: begin e.test = 1; e.val = {31'd0, x == y}; end
    endcase
    return e;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && en) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (e.val !== result || e.test !== out_test || e.rd !== out_rd || ecyc - e.t != LAT_INT - 1) begin
          failures++;
          $display("FAIL got %h/%0d exp %h/%0d lat %0d", result, out_test, e.val, e.test, ecyc - e.t);
        end
      end
    end
    if (in_valid && en) q.push_back(model(op, a, b, rd, ecyc));
    if (en) ecyc++;
  end

  initial begin
    op = A_ADD; a = 0; b = 0; rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      op = aluop_e'($urandom_range(0, 7));
      a = $urandom; b = ($urandom_range(0, 7) == 0) ? a : $urandom;
      if ($urandom_range(0, 3) == 0) b = $urandom_range(0, 5);
      rd = RIDX_W'($urandom);
      en = (i > 200) ? ($urandom_range(0, 4) != 0) : 1'b1;
    end
    @(negedge clk); in_valid = 0; en = 1;
    repeat (5) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("missing outputs %0d", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
