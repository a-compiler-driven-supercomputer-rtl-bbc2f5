// mem_interface: the data-memory interface of the ROPE processor, with the
// address hash and the multi-bank data memory behind it.
//
// The data path may issue one load or store per cycle. A request (register
// indirect: the address is a register value, there are no addressing
// modes) spends its first cycle in the address hash, which picks the bank
// and row, and is then started on its bank. Different banks work
// concurrently; if the chosen bank is still busy with an earlier operation
// the interface raises `mem_freeze`, which freezes the whole processor until
// the bank is free. A load's data then travels through a stallable delay so
// that it is written back a fixed LATENCY cycles after issue (the
// architecture's 6-cycle indexed data fetch): an instruction issued in cycle
// t+LATENCY reads it. Stores write the bank when they start.
//
// `req_valid` is the undecided request in the issue slot; it is taken when
// `en` (no freeze) is high. `mem_freeze` depends only on registered state,
// so it never loops back through the issue logic.
// The hash cycle inside the 6-cycle latency, the bank count and busy time
// and the host port (for the service side to load data and read results
// while the program is not using memory) are this design's choices.
module mem_interface
  import rope_pkg::*;
#(
  parameter int unsigned AW          = DADDR_W,
  parameter int unsigned NBANKS      = 8,
  parameter int unsigned BUSY_CYCLES = 4,
  parameter int unsigned LATENCY     = LAT_MEM,
  parameter bit          HASH        = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              req_valid,
  input  logic              req_we,
  input  logic [AW-1:0]     req_addr,
  input  logic [XLEN-1:0]   req_wdata,
  input  logic [RIDX_W-1:0] req_rd,
  output logic              mem_freeze,
  output logic              ld_valid,
  output logic [RIDX_W-1:0] ld_rd,
  output logic [XLEN-1:0]   ld_data,
  // host port
  input  logic              host_we,
  input  logic [AW-1:0]     host_addr,
  input  logic [XLEN-1:0]   host_wdata,
  output logic [XLEN-1:0]   host_rdata,
  // observation
  output logic [NBANKS-1:0] bank_busy
);

  localparam int unsigned NB_W  = $clog2(NBANKS);
  localparam int unsigned ROW_W = AW - NB_W;

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [NB_W-1:0]   bank;
    logic [ROW_W-1:0]  row;
    logic [XLEN-1:0]   wdata;
    logic [RIDX_W-1:0] rd;
  } req_t;

  typedef struct packed {
    logic [RIDX_W-1:0] rd;
    logic [XLEN-1:0]   data;
  } ld_t;

  logic [NB_W-1:0]  in_bank, host_bank;
  logic [ROW_W-1:0] in_row, host_row;
  req_t             hs_q;                   // request in the hash stage
  logic [NBANKS-1:0] b_start;
  logic [XLEN-1:0]   b_rdata [NBANKS];
  logic [XLEN-1:0]   b_host_rdata [NBANKS];
  ld_t               ld_in, ld_out;

  address_hash #(.AW(AW), .NB_W(NB_W), .HASH(HASH)) u_hash (
    .addr(req_addr), .bank(in_bank), .row(in_row)
  );
  address_hash #(.AW(AW), .NB_W(NB_W), .HASH(HASH)) u_host_hash (
    .addr(host_addr), .bank(host_bank), .row(host_row)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs_q <= '0;
    end else if (en) begin
      hs_q.valid <= req_valid;
      hs_q.we    <= req_we;
      hs_q.bank  <= in_bank;
      hs_q.row   <= in_row;
      hs_q.wdata <= req_wdata;
      hs_q.rd    <= req_rd;
    end
  end

  assign mem_freeze = hs_q.valid && bank_busy[hs_q.bank];

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    assign b_start[b] = en && hs_q.valid && (hs_q.bank == NB_W'(b));
    dmem_bank #(.ROW_W(ROW_W), .W(XLEN), .BUSY_CYCLES(BUSY_CYCLES)) u_bank (
      .clk, .rst_n,
      .start     (b_start[b]),
      .we        (hs_q.we),
      .row       (hs_q.row),
      .wdata     (hs_q.wdata),
      .rdata     (b_rdata[b]),
      .busy      (bank_busy[b]),
      .host_we   (host_we && (host_bank == NB_W'(b))),
      .host_row  (host_row),
      .host_wdata(host_wdata),
      .host_rdata(b_host_rdata[b])
    );
  end

  assign ld_in.rd   = hs_q.rd;
  assign ld_in.data = b_rdata[hs_q.bank];

  // hash cycle + bank cycle + (LATENCY-2) more stages: written back at the
  // end of cycle t+LATENCY-1
  stage_pipe #(.W($bits(ld_t)), .DEPTH(LATENCY - 2)) u_ld_pipe (
    .clk, .rst_n, .en,
    .in_valid (hs_q.valid && !hs_q.we),
    .in_data  (ld_in),
    .out_valid(ld_valid),
    .out_data (ld_out)
  );

  assign ld_rd      = ld_out.rd;
  assign ld_data    = ld_out.data;
  assign host_rdata = b_host_rdata[host_bank];

  initial assert (LATENCY >= 3 && NBANKS == 2 ** NB_W)
    else $error("mem_interface: LATENCY must be >= 3 and NBANKS a power of two");

endmodule
