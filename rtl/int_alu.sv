// int_alu: the pipelined integer unit of the ROPE data path.
//
// It adds, subtracts, does bitwise AND/OR/XOR, and performs the integer
// tests (signed less-than, greater-than, equal) that set condition bits.
// A new operation may start every cycle and each takes LATENCY cycles: the
// result of an operation issued in cycle t is written back at the end of
// cycle t+LATENCY-1, so an instruction issued in cycle t+LATENCY reads it.
// The architecture's operation-time table gives 2 cycles for integer add and
// compare. The operation is computed in the issue cycle and carried through
// LATENCY-1 stallable stages (`en` low during a freeze); how the logic is
// split among the stages is left to retiming. A test returns its outcome in
// result bit 0 with `out_test` set, addressed to condition bit `rd`.
module int_alu
  import rope_pkg::*;
#(
  parameter int unsigned LATENCY = LAT_INT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              in_valid,
  input  aluop_e            op,
  input  logic [XLEN-1:0]   a,
  input  logic [XLEN-1:0]   b,
  input  logic [RIDX_W-1:0] rd,
  output logic              out_valid,
  output logic              out_test,
  output logic [RIDX_W-1:0] out_rd,
  output logic [XLEN-1:0]   result
);

  typedef struct packed {
    logic              test;
    logic [RIDX_W-1:0] rd;
    logic [XLEN-1:0]   val;
  } res_t;

  res_t r;

  always_comb begin
    r.rd   = rd;
    r.test = 1'b0;
    unique case (op)
      A_ADD: r.val = a + b;
      A_SUB: r.val = a - b;
      A_AND: r.val = a & b;
      A_OR:  r.val = a | b;
      A_XOR: r.val = a ^ b;
      A_TLT: begin r.test = 1'b1; r.val = XLEN'($signed(a) <  $signed(b)); end
      A_TGT: begin r.test = 1'b1; r.val = XLEN'($signed(a) >  $signed(b)); end
      A_TEQ: begin r.test = 1'b1; r.val = XLEN'(a == b); end
      default: r.val = '0;
    endcase
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
