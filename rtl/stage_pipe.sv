// stage_pipe: a stallable pipeline of DEPTH register stages carrying a valid
// bit and a payload. All stages advance together when `en` is high and hold
// when it is low, so the processor freeze stops every functional unit
// pipeline at once and the compiler's cycle-exact schedule is preserved.
// Output timing: an item entered in a cycle with `en` high appears on the
// output DEPTH enabled cycles later. DEPTH must be at least 1.
module stage_pipe #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [DEPTH-1:0] v_q;
  logic [W-1:0]     d_q [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      for (int i = 0; i < DEPTH; i++) d_q[i] <= '0;
    end else if (en) begin
      v_q[0] <= in_valid;
      d_q[0] <= in_data;
      for (int i = 1; i < DEPTH; i++) begin
        v_q[i] <= v_q[i-1];
        d_q[i] <= d_q[i-1];
      end
    end
  end

  assign out_valid = v_q[DEPTH-1];
  assign out_data  = d_q[DEPTH-1];

  initial assert (DEPTH >= 1) else $error("stage_pipe: DEPTH must be at least 1");

endmodule
