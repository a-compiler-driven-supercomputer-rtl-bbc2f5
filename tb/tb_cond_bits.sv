// tb_cond_bits: random test results written to the condition bits through
// two ports, checked against a model one cycle later; a collision on one
// bit must leave the value of the higher port.
module tb_cond_bits;
  import rope_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0]        we;
  logic [CIDX_W-1:0] idx [2];
  logic [1:0]        value;
  logic [NCOND-1:0]  bits, model;
  int checks = 0, failures = 0;

  cond_bits #(.NW(2)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    we = 0; idx[0] = 0; idx[1] = 0; value = 0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      checks++;
      if (bits !== model) begin failures++; $display("bits %b model %b", bits, model); end
      we = 2'($urandom); value = 2'($urandom);
      idx[0] = CIDX_W'($urandom); idx[1] = ($urandom_range(0, 3) == 0) ? idx[0] : CIDX_W'($urandom);
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (we[p]) model[idx[p]] = value[p];
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
