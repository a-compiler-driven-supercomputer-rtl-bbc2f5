// address_hash: maps a data word address to a memory bank and a row.
//
// Using the low address bits as the bank number makes strided accesses
// collide on one bank; the architecture proposes a hash instead. Here the
// bank number is the XOR of the low NB_W address bits with every further
// NB_W-bit slice of the address, and the row is the address without its low
// NB_W bits. Because the row keeps all high bits, the low bits can be
// recovered from (bank, row), so the mapping is one-to-one and every address
// has its own cell. With HASH = 0 the bank is simply the low bits. The XOR
// fold is this design's choice: the architecture asks only for a function
// that is quick in hardware. Purely combinational; the memory interface
// spends one pipeline cycle on it.
module address_hash #(
  parameter int unsigned AW   = 16,
  parameter int unsigned NB_W = 3,
  parameter bit          HASH = 1'b1
) (
  input  logic [AW-1:0]      addr,
  output logic [NB_W-1:0]    bank,
  output logic [AW-NB_W-1:0] row
);

  localparam int unsigned NSLICE = (AW + NB_W - 1) / NB_W;

  always_comb begin
    logic [NSLICE*NB_W-1:0] ext;
    ext  = (NSLICE*NB_W)'(addr);
    bank = addr[NB_W-1:0];
    if (HASH) begin
      for (int s = 1; s < NSLICE; s++) bank = bank ^ ext[s*NB_W +: NB_W];
    end
    row = addr[AW-1:NB_W];
  end

endmodule
