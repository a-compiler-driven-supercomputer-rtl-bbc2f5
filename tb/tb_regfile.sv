// tb_regfile: random multi-port writes and reads against a behavioural
// array, including same-register collisions (the higher port must win),
// reset to zero, and the one-cycle write-to-read timing.
module tb_regfile;
  import rope_pkg::*;
  localparam int NR = 3, NW = 5;
  logic clk = 0, rst_n = 0;
  logic [RIDX_W-1:0] raddr [NR];
  logic [31:0]       rdata [NR];
  logic [NW-1:0]     we;
  logic [RIDX_W-1:0] waddr [NW];
  logic [31:0]       wdata [NW];
  logic [31:0]       model [NREG];
  int checks = 0, failures = 0;

  regfile #(.NR(NR), .NW(NW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = '0;
    for (int p = 0; p < NW; p++) begin waddr[p] = 0; wdata[p] = 0; end
    for (int p = 0; p < NR; p++) raddr[p] = 0;
    for (int i = 0; i < NREG; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NREG; i++) begin
      raddr[0] = RIDX_W'(i); #1;
      checks++; if (rdata[0] !== 32'd0) begin failures++; $display("reset value r%0d", i); end
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p] = ($urandom_range(0, 2) == 0);
        waddr[p] = ($urandom_range(0, 3) == 0) ? RIDX_W'(5) : RIDX_W'($urandom);
        wdata[p] = $urandom;
      end
      for (int p = 0; p < NR; p++) raddr[p] = RIDX_W'($urandom);
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin failures++; $display("read mismatch r%0d", raddr[p]); end
      end
      @(posedge clk);
      for (int p = 0; p < NW; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
