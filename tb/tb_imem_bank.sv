// tb_imem_bank: loads random words over the reload port, then fetches
// random rows: `done` must come exactly LATENCY-1 cycles after the start
// cycle with the right word, and a restart while a fetch is under way must
// abort it (no `done` for the old fetch, full latency for the new one).
module tb_imem_bank;
  localparam int ROW_W = 5, W = 40, LAT = 6;
  logic clk = 0, rst_n = 0;
  logic start = 0, done, load_we = 0;
  logic [ROW_W-1:0] row, load_row;
  logic [W-1:0] rdata, load_data;
  logic [W-1:0] model [2**ROW_W];
  int checks = 0, failures = 0;

  imem_bank #(.ROW_W(ROW_W), .WORD_W(W), .LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;

  task automatic fetch(input logic [ROW_W-1:0] r, input int abort_after);
    int k;
    @(negedge clk); start = 1; row = r;
    @(negedge clk); start = 0;
    for (k = 1; k < LAT - 1; k++) begin
      checks++;
      if (done) begin failures++; $display("early done at %0d", k); end
      if (k == abort_after) return;
      @(negedge clk);
    end
    checks++;
    if (!done || rdata !== model[r]) begin failures++; $display("fetch row %0d done=%0d", r, done); end
    @(negedge clk);
    checks++;
    if (done) begin failures++; $display("done longer than one cycle"); end
  endtask

  initial begin
    row = 0; load_row = 0; load_data = 0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 2**ROW_W; r++) begin
      @(negedge clk); load_we = 1; load_row = ROW_W'(r);
      load_data = {$urandom, $urandom}; model[r] = load_data;
    end
    @(negedge clk); load_we = 0;
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      if (n % 5 == 4) fetch(ROW_W'($urandom), $urandom_range(1, LAT - 2));
      fetch(ROW_W'($urandom), 100);
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
