// tb_mem_interface: random loads and stores, one offered per cycle, to a
// small hashed 4-bank memory so that bank conflicts are frequent, with
// extra random freezes from elsewhere. An independent model tracks when
// each bank becomes free and predicts `mem_freeze` cycle by cycle; loads
// must return the model memory's value (sequential semantics in issue
// order) exactly LATENCY-1 enabled cycles after they were taken.
module tb_mem_interface;
  import rope_pkg::*;
  localparam int AW = 8, NB = 4, BUSY = 4;
  logic clk = 0, rst_n = 0, en;
  logic ext_en = 1;
  logic req_valid = 0, req_we = 0;
  logic [AW-1:0] req_addr;
  logic [31:0] req_wdata, ld_data, host_wdata, host_rdata;
  logic [RIDX_W-1:0] req_rd, ld_rd;
  logic mem_freeze, ld_valid, host_we = 0;
  logic [AW-1:0] host_addr;
  logic [NB-1:0] bank_busy;
  int checks = 0, failures = 0, freezes = 0;
  int cyc = 0, ecyc = 0;

  logic [31:0] model [2**AW];
  int free_cyc [NB];
  typedef struct { logic valid, we; logic [AW-1:0] addr; logic [31:0] data; logic [RIDX_W-1:0] rd; int t; } r_t;
  typedef struct { logic [31:0] data; logic [RIDX_W-1:0] rd; int t; } l_t;
  r_t hs;
  l_t lq[$];

  mem_interface #(.AW(AW), .NBANKS(NB), .BUSY_CYCLES(BUSY), .HASH(1)) dut (.*);
  assign en = ext_en && !mem_freeze;
  always #5 clk = ~clk;

  function automatic int bank_of(logic [AW-1:0] a);
    return int'(a[1:0] ^ a[3:2] ^ a[5:4] ^ a[7:6]);
  endfunction

  always @(posedge clk) if (rst_n) begin
    logic exp_freeze;
    exp_freeze = hs.valid && (cyc < free_cyc[bank_of(hs.addr)]);
    checks++;
    if (exp_freeze !== mem_freeze) begin failures++; $display("cyc %0d freeze %0d expected %0d", cyc, mem_freeze, exp_freeze); end
    if (mem_freeze) freezes++;
    if (ld_valid && en) begin
      l_t e;
      checks++;
      if (lq.size() == 0) begin failures++; $display("unexpected load result"); end
      else begin
        e = lq.pop_front();
        if (e.data !== ld_data || e.rd !== ld_rd || ecyc - e.t != LAT_MEM - 1) begin
          failures++; $display("load got %h exp %h lat %0d", ld_data, e.data, ecyc - e.t);
        end
      end
    end
    if (en) begin
      if (hs.valid) begin
        free_cyc[bank_of(hs.addr)] = cyc + BUSY;
        if (hs.we) model[hs.addr] = hs.data;
        else lq.push_back('{model[hs.addr], hs.rd, hs.t});
      end
      hs = '{req_valid, req_we, req_addr, req_wdata, req_rd, ecyc};
      ecyc++;
    end
    cyc++;
  end

  initial begin
    hs = '{0, 0, 0, 0, 0, 0};
    for (int b = 0; b < NB; b++) free_cyc[b] = 0;
    req_addr = 0; req_wdata = 0; req_rd = 0; host_addr = 0; host_wdata = 0;
    repeat (2) @(posedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); host_we = 1; host_addr = AW'(a); host_wdata = $urandom; model[a] = host_wdata;
    end
    @(negedge clk); host_we = 0;
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (en || !req_valid) begin   // a request stays offered until it is taken
        req_valid = $urandom_range(0, 2) != 0;
        req_we = $urandom_range(0, 2) == 0;
        req_addr = AW'($urandom);
        req_wdata = $urandom; req_rd = RIDX_W'($urandom);
      end
      ext_en = (n > 500) ? ($urandom_range(0, 5) != 0) : 1'b1;
    end
    @(negedge clk); req_valid = 0; ext_en = 1;
    repeat (12) @(posedge clk);
    checks++; if (lq.size() != 0) begin failures++; $display("loads missing"); end
    checks++; if (freezes == 0) begin failures++; $display("no bank conflict seen"); end
    // host read-back of the final memory
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk); host_addr = AW'(a); #1;
      checks++; if (host_rdata !== model[a]) begin failures++; $display("host read %h", a); end
    end
    $display("freezes: %0d", freezes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
