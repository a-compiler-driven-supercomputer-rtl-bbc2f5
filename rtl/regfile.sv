// regfile: the register file of the ROPE data path.
//
// NREG registers of XLEN bits with NR combinational read ports and NW write
// ports, one per result source, so that every functional unit can write back
// in the same cycle without arbitration (the architecture only asks for a
// large register file that may be split into banks for more ports; port
// count and size are this design's choices). Writes take effect at the clock
// edge and are seen by reads in the next cycle. If two ports write the same
// register in one cycle the higher-numbered port wins; a correct static
// schedule never does this. All registers reset to zero.
module regfile
  import rope_pkg::*;
#(
  parameter int unsigned N  = NREG,
  parameter int unsigned W  = XLEN,
  parameter int unsigned NR = 3,
  parameter int unsigned NW = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] raddr [NR],
  output logic [W-1:0]         rdata [NR],
  input  logic [NW-1:0]        we,
  input  logic [$clog2(N)-1:0] waddr [NW],
  input  logic [W-1:0]         wdata [NW]
);

  logic [W-1:0] r [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else begin
      for (int p = 0; p < NW; p++) begin
        if (we[p]) r[waddr[p]] <= wdata[p];
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NR; p++) rdata[p] = r[raddr[p]];
  end

endmodule
