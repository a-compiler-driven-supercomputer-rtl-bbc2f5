// instr_pointer: the instruction-pointer register of the ROPE processor.
//
// ROPE has no program counter in the usual sense: the address of the next
// instruction is implied by the pre-fetch unit that holds the activate
// token. The instruction pointer records, at every issue, the address of the
// issued instruction so that the data path can read it (RDIP) to build a
// return address, which a later PRE-FETCH can take from a register. An RDIP
// issued in cycle t reads the address of the instruction issued before it;
// that read-before-update timing, the reset value 0 and the `count` of
// issued instructions are this design's choices.
module instr_pointer
  import rope_pkg::*;
#(
  parameter int unsigned AW = IADDR_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          issue,
  input  logic [AW-1:0] addr,
  output logic [AW-1:0] ip,
  output logic [31:0]   count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ip    <= '0;
      count <= '0;
    end else if (issue) begin
      ip    <= addr;
      count <= count + 1'b1;
    end
  end

endmodule
