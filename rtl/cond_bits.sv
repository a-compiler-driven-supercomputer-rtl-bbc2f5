// cond_bits: the condition-bit registers of the ROPE data path.
//
// Condition bits are set only by explicit test instructions (integer or
// floating-point compares), never as a side effect of arithmetic, so that
// several of them can feed one multi-way jump. Each write port names one
// bit and gives its new value; the write takes effect at the clock edge and
// the JUMP of a later cycle compares the registered bits with the condition
// masks stored in the pre-fetch units. With two writes to one bit in a cycle
// the higher-numbered port wins. The bits reset to zero; their number and
// the number of ports are this design's choices.
module cond_bits
  import rope_pkg::*;
#(
  parameter int unsigned N  = NCOND,
  parameter int unsigned NW = 2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NW-1:0]        we,
  input  logic [$clog2(N)-1:0] idx [NW],
  input  logic [NW-1:0]        value,
  output logic [N-1:0]         bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bits <= '0;
    end else begin
      for (int p = 0; p < NW; p++) begin
        if (we[p]) bits[idx[p]] <= value[p];
      end
    end
  end

endmodule
