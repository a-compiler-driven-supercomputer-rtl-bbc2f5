// tb_dmem_bank: random reads and writes, each started only when the bank is
// free; checks read data against a model, that `busy` lasts exactly
// BUSY_CYCLES-1 cycles after a start, and the host port.
module tb_dmem_bank;
  localparam int ROW_W = 6, BUSY = 4;
  logic clk = 0, rst_n = 0;
  logic start = 0, we = 0, host_we = 0, busy;
  logic [ROW_W-1:0] row, host_row;
  logic [31:0] wdata, rdata, host_wdata, host_rdata;
  logic [31:0] model [2**ROW_W];
  int checks = 0, failures = 0;

  dmem_bank #(.ROW_W(ROW_W), .BUSY_CYCLES(BUSY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    row = 0; host_row = 0; wdata = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // host fills the bank
    for (int r = 0; r < 2**ROW_W; r++) begin
      @(negedge clk); host_we = 1; host_row = ROW_W'(r); host_wdata = $urandom; model[r] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("busy before start"); end
      start = 1; we = $urandom_range(0, 1); row = ROW_W'($urandom); wdata = $urandom;
      #1;
      if (!we) begin
        checks++;
        if (rdata !== model[row]) begin failures++; $display("read row %0d", row); end
      end
      @(posedge clk);
      if (we) model[row] = wdata;
      @(negedge clk); start = 0;
      for (int k = 1; k < BUSY; k++) begin
        checks++;
        if (!busy) begin failures++; $display("busy dropped after %0d", k); end
        @(negedge clk);
      end
      host_row = row; #1;
      checks++;
      if (host_rdata !== model[row]) begin failures++; $display("host read row %0d", row); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
