// fp_mul: the pipelined floating-point multiplier of the ROPE data path.
//
// Multiplies two IEEE-754 single-precision words. A new operation may start
// every cycle and each takes LATENCY cycles; the architecture gives no
// multiply time, so 4 cycles, the same as its floating-point add, is this
// design's choice. The product is formed in the issue cycle and carried
// through LATENCY-1 stallable stages (`en` low during a freeze).
// Rounding is to nearest, ties to even; subnormal inputs are read as zero,
// results below the normal range are flushed to zero and overflow gives
// infinity. NaN and infinity inputs are not treated specially.
module fp_mul
  import rope_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_FMUL
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  logic [31:0]       a,
  input  logic [31:0]       b,
  input  logic [RIDX_W-1:0] rd,
  output logic              out_valid,
  output logic [RIDX_W-1:0] out_rd,
  output logic [31:0]       result
);

  typedef struct packed {
    logic [RIDX_W-1:0] rd;
    logic [31:0]       val;
  } res_t;

  function automatic logic [31:0] fmul(logic [31:0] x, logic [31:0] y);
    logic        s;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    int          e;
    s = x[31] ^ y[31];
    if (x[30:23] == 0 || y[30:23] == 0) return {s, 31'd0};
    p = {1'b1, x[22:0]} * {1'b1, y[22:0]};
    e = int'(x[30:23]) + int'(y[30:23]) - 127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    if (g && (st || m[0])) begin
      if (m == 24'hFF_FFFF) begin
        m = 24'h80_0000;
        e = e + 1;
      end else begin
        m = m + 1'b1;
      end
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  res_t r, q;

  assign r.rd  = rd;
  assign r.val = fmul(a, b);

  stage_pipe #(.W($bits(res_t)), .DEPTH(LATENCY - 1)) u_pipe (
    .clk, .rst_n, .en,
    .in_valid (in_valid),
    .in_data  (r),
    .out_valid(out_valid),
    .out_data (q)
  );

  assign out_rd = q.rd;
  assign result = q.val;

endmodule
