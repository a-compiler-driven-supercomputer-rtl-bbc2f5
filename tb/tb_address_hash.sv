// tb_address_hash: checks the XOR-fold bank function on random addresses,
// that the mapping is one-to-one over a whole 12-bit address space, and that
// a stride equal to the bank count, which hits one bank with low-bit
// interleaving, is spread over all banks by the hash.
module tb_address_hash;
  localparam int AW = 12, NB_W = 3;
  logic [AW-1:0] addr;
  logic [NB_W-1:0] bank;
  logic [AW-NB_W-1:0] row;
  bit seen [2**AW];
  int checks = 0, failures = 0;
  int used [2**NB_W];

  address_hash #(.AW(AW), .NB_W(NB_W), .HASH(1)) dut (.*);

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      logic [NB_W-1:0] exp_b;
      addr = AW'(a); #1;
      exp_b = addr[2:0] ^ addr[5:3] ^ addr[8:6] ^ addr[11:9];
      checks++;
      if (bank !== exp_b || row !== addr[AW-1:NB_W]) begin failures++; $display("addr %h bank %0d", addr, bank); end
      checks++;
      if (seen[{row, bank}]) begin failures++; $display("collision at %h", addr); end
      seen[{row, bank}] = 1;
    end
    for (int i = 0; i < 64; i++) begin
      addr = AW'(i * 8); #1;
      used[bank]++;
    end
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (used[b] != 8) begin failures++; $display("stride-8 bank %0d used %0d times", b, used[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
