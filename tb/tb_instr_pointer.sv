// tb_instr_pointer: the pointer must take the address of every issued
// instruction at the clock edge, hold it when nothing issues, and count
// issues.
module tb_instr_pointer;
  import rope_pkg::*;
  logic clk = 0, rst_n = 0, issue = 0;
  logic [IADDR_W-1:0] addr, ip, m_ip;
  logic [31:0] count, m_cnt;
  int checks = 0, failures = 0;

  instr_pointer dut (.*);
  always #5 clk = ~clk;

  initial begin
    addr = 0; m_ip = 0; m_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      checks++;
      if (ip !== m_ip || count !== m_cnt) begin failures++; $display("ip %h exp %h", ip, m_ip); end
      issue = $urandom_range(0, 1); addr = IADDR_W'($urandom);
      @(posedge clk);
      if (issue) begin m_ip = addr; m_cnt++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
