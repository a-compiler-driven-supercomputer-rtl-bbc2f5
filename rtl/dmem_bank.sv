// dmem_bank: one bank of the ROPE data memory.
//
// A bank handles one operation at a time. A `start` pulse reads or writes
// the row at once (reads return `rdata` combinationally in the start cycle)
// and then keeps the bank `busy` for BUSY_CYCLES-1 further cycles, standing
// in for the recovery time of a slow memory. Busy time counts real clock
// cycles, also while the processor is frozen, because the freeze is what
// waits for the bank. A start while busy is a protocol error (asserted); the
// memory interface freezes the processor instead. The host port reads and
// writes the array for loading data and reading results. The busy time is
// this design's choice: the architecture only says a bank is slower than
// the one-request-per-cycle rate of the memory as a whole.
module dmem_bank
  import rope_pkg::*;
#(
  parameter int unsigned ROW_W       = 13,
  parameter int unsigned W           = XLEN,
  parameter int unsigned BUSY_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             we,
  input  logic [ROW_W-1:0] row,
  input  logic [W-1:0]     wdata,
  output logic [W-1:0]     rdata,
  output logic             busy,
  // host access
  input  logic             host_we,
  input  logic [ROW_W-1:0] host_row,
  input  logic [W-1:0]     host_wdata,
  output logic [W-1:0]     host_rdata
);

  localparam int unsigned CW = $clog2(BUSY_CYCLES + 1);

  logic [W-1:0]  mem [2**ROW_W];
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (start && we)       mem[row]      <= wdata;
    else if (host_we)      mem[host_row] <= host_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              cnt_q <= '0;
    else if (start)          cnt_q <= CW'(BUSY_CYCLES - 1);
    else if (cnt_q != '0)    cnt_q <= cnt_q - 1'b1;
  end

  assign busy       = (cnt_q != '0);
  assign rdata      = mem[row];
  assign host_rdata = mem[host_row];

  a_no_start_busy: assert property (@(posedge clk) disable iff (!rst_n) !(start && busy))
    else $error("dmem_bank: operation started on a busy bank");

endmodule
