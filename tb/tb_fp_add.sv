// tb_fp_add: random single-precision additions, subtractions and compares
// through the floating-point adder, with random freezes. The reference adds
// in double precision (exact for the operand ranges used) and rounds the
// double to single, to nearest even. Results must appear LATENCY-1 enabled
// cycles after issue (4-cycle floating-point add).
module tb_fp_add;
  import rope_pkg::*;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic sub, test_lt, test_gt;
  logic [31:0] a, b, result;
  logic [RIDX_W-1:0] rd, out_rd;
  logic out_valid, out_test;
  int checks = 0, failures = 0, ecyc = 0;

  typedef struct { logic [31:0] val; logic test; int t; logic [31:0] a, b; int k; logic zero; } exp_t;
  exp_t q[$];

  fp_add dut (.*);

  always #5 clk = ~clk;

  function automatic real s2r(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 0) return 0.0;
    d = {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2s(real r);
    logic [63:0] d; logic [52:0] m; logic [23:0] mm; int e; logic g, st;
    d = $realtobits(r);
    if (d[62:52] == 0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b1, d[51:0]};
    mm = m[52:29]; g = m[28]; st = |m[27:0];
    if (g && (st || mm[0])) begin
      if (mm == 24'hFFFFFF) begin mm = 24'h800000; e++; end else mm++;
    end
    if (e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mm[22:0]};
  endfunction

  function automatic logic [31:0] rnd_fp(int emid);
    logic [31:0] x;
    x = $urandom;
    x[30:23] = 8'(emid + $urandom_range(0, 12) - 6);
    if ($urandom_range(0, 15) == 0) x[30:0] = 0;
    return x;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (out_valid && en) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (e.zero) e.val[31] = result[31];
        if (e.val !== result || e.test !== out_test || ecyc - e.t != LAT_FADD - 1) begin
          failures++;
          $display("FAIL got %h/%0d exp %h/%0d lat %0d a=%h b=%h k=%0d", result, out_test, e.val, e.test, ecyc - e.t, e.a, e.b, e.k);
        end
      end
    end
    if (in_valid && en) begin
      exp_t e; e.t = ecyc; e.a = a; e.b = b; e.k = {sub, test_lt, test_gt};
      e.test = test_lt || test_gt;
      if (test_lt)      e.val = {31'd0, s2r(a) < s2r(b)};
      else if (test_gt) e.val = {31'd0, s2r(a) > s2r(b)};
      else              e.val = r2s(sub ? s2r(a) - s2r(b) : s2r(a) + s2r(b));
      e.zero = !e.test && e.val[30:0] == 0;   // sign of an exact zero is not checked
      q.push_back(e);
    end
    if (en) ecyc++;
  end

  initial begin
    sub = 0; test_lt = 0; test_gt = 0; a = 0; b = 0; rd = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int k;
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      k = $urandom_range(0, 5);
      sub = (k == 1); test_lt = (k == 2); test_gt = (k == 3);
      a = rnd_fp(127);
      b = ($urandom_range(0, 9) == 0) ? {~a[31], a[30:0]} : rnd_fp(127);
      if ($urandom_range(0, 9) == 0) b = a;
      rd = RIDX_W'($urandom);
      en = (i > 300) ? ($urandom_range(0, 4) != 0) : 1'b1;
    end
    @(negedge clk); in_valid = 0; en = 1;
    repeat (8) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
