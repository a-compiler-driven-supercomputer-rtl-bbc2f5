// fp_add: the pipelined floating-point adder of the ROPE data path.
//
// Operates on IEEE-754 single-precision words: add, subtract, and the
// floating-point tests less-than and greater-than that set condition bits.
// A new operation may start every cycle and each takes LATENCY cycles (the
// architecture's table gives 4 for floating-point add and compare); the
// result of an operation issued in cycle t is written at the end of cycle
// t+LATENCY-1. The sum is formed in the issue cycle and carried through
// LATENCY-1 stallable stages (`en` low during a freeze).
//
// Arithmetic (this design's choice, the architecture fixes no format):
// operands are aligned with guard, round and sticky bits and the result is
// rounded to nearest, ties to even. Subnormal inputs are read as zero and
// results below the normal range are flushed to zero; overflow gives
// infinity. NaN and infinity inputs are not treated specially. A test
// treats +0 and -0 as equal and returns its outcome in result bit 0 with
// `out_test` set.
module fp_add
  import rope_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_FADD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic              sub,      // a - b
  input  logic              test_lt,  // cond <= a < b
  input  logic              test_gt,  // cond <= a > b
  input  logic [31:0]       a,
  input  logic [31:0]       b,
  input  logic [RIDX_W-1:0] rd,
  output logic              out_valid,
  output logic              out_test,
  output logic [RIDX_W-1:0] out_rd,
  output logic [31:0]       result
);

  typedef struct packed {
    logic              test;
    logic [RIDX_W-1:0] rd;
    logic [31:0]       val;
  } res_t;

  // ---- comparison on order-preserving keys ---------------------------------
  function automatic logic [31:0] order_key(logic [31:0] x);
    logic [31:0] y;
    y = (x[30:23] == 8'd0) ? 32'd0 : x;   // zero and subnormals -> +0
    return y[31] ? ~y : (y | 32'h8000_0000);
  endfunction

  // ---- addition ----------------------------------------------------------
  function automatic logic [31:0] fadd(logic [31:0] x, logic [31:0] y);
    logic        sx, sy, eff_sub;
    logic [7:0]  ex, ey;
    logic [23:0] mx, my;
    logic [7:0]  d;
    logic [26:0] ax, ay;        // hidden.frac,G,R,S
    logic        sticky;
    logic [27:0] s;
    int          e;
    int          lz;
    logic [23:0] m;
    logic        rnd;
    // larger magnitude first
    if (y[30:0] > x[30:0]) begin
      logic [31:0] t;
      t = x; x = y; y = t;
    end
    sx = x[31]; sy = y[31];
    ex = x[30:23]; ey = y[30:23];
    mx = (ex == 0) ? 24'd0 : {1'b1, x[22:0]};
    my = (ey == 0) ? 24'd0 : {1'b1, y[22:0]};
    if (ex == 0) return 32'd0;                 // both operands zero
    d  = ex - ((ey == 0) ? ex : ey);
    ax = {mx, 3'b000};
    if (my == 0) begin
      ay = '0;
    end else if (d >= 8'd27) begin
      ay = 27'd1;                              // only the sticky bit survives
    end else begin
      ay     = {my, 3'b000} >> d;
      sticky = |({my, 3'b000} & ((27'd1 << d) - 27'd1));
      ay[0]  = ay[0] | sticky;
    end
    eff_sub = sx ^ sy;
    e = int'(ex);
    if (!eff_sub) begin
      s = {1'b0, ax} + {1'b0, ay};
      if (s[27]) begin
        s = {1'b0, s[27:2], s[1] | s[0]};
        e = e + 1;
      end
    end else begin
      s = {1'b0, ax} - {1'b0, ay};
      if (s == 0) return 32'd0;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - lz;
    end
    // s[26] is the hidden bit, s[2:0] = guard, round, sticky
    rnd = s[2] && (s[1] || s[0] || s[3]);
    m   = s[26:3];
    if (rnd) begin
      if (m == 24'hFF_FFFF) begin
        m = 24'h80_0000;
        e = e + 1;
      end else begin
        m = m + 1'b1;
      end
    end
    if (e <= 0)   return {sx, 31'd0};
    if (e >= 255) return {sx, 8'hFF, 23'd0};
    return {sx, 8'(e), m[22:0]};
  endfunction

  res_t r;

  always_comb begin
    r.rd   = rd;
    r.test = test_lt || test_gt;
    if (test_lt)      r.val = 32'(order_key(a) < order_key(b));
    else if (test_gt) r.val = 32'(order_key(a) > order_key(b));
    else              r.val = fadd(a, {b[31] ^ sub, b[30:0]});
  end

  res_t q;

  stage_pipe #(.W($bits(res_t)), .DEPTH(LATENCY - 1)) u_pipe (
    .clk, .rst_n, .en,
    .in_valid (in_valid),
    .in_data  (r),
    .out_valid(out_valid),
    .out_data (q)
  );

  assign out_test = q.test;
  assign out_rd   = q.rd;
  assign result   = q.val;

endmodule
