// imem_bank: the instruction memory bank behind one pre-fetch unit.
//
// Each pre-fetch unit of the ring owns one bank; a bank holds every
// instruction whose address has the unit's number in its low bits, so the
// bank is addressed by the high part of the instruction address only.
// A fetch is started by a one-cycle `start` pulse with the row address; the
// bank then works on it for LATENCY cycles and raises `done` for one cycle
// in the last of them, with the word on `rdata`. A unit that has started a
// fetch sees it complete so that it is ready LATENCY cycles after the start
// cycle (the architecture's 6-cycle non-sequential instruction fetch). A new
// `start` while a fetch is under way aborts that fetch and begins the new
// one, as the architecture requires when a start-fetch token reaches a busy
// unit.
//
// With BOOT set, reset leaves the bank fetching row 0.
//
// The reload port (`load_we`, `load_row`, `load_data`) is the external
// program-reload bus; it writes a word in one cycle, independently of
// fetches. The fixed latency counter stands in for the slow RAM timing
// (the row/column strobes of the real part are not modelled); that and the
// port widths are this design's choices.
module imem_bank
  import rope_pkg::*;
#(
  parameter int unsigned ROW_W   = 11,
  parameter int unsigned WORD_W  = INSTR_W,
  parameter int unsigned LATENCY = LAT_IFETCH,
  parameter bit          BOOT    = 1'b0   // start fetching row 0 out of reset
) (
  input  logic              clk,
  input  logic              rst_n,
  // ram control and row/column address from the pre-fetch unit
  input  logic              start,
  input  logic [ROW_W-1:0]  row,
  output logic              done,
  output logic [WORD_W-1:0] rdata,
  // program load
  input  logic              load_we,
  input  logic [ROW_W-1:0]  load_row,
  input  logic [WORD_W-1:0] load_data
);

  localparam int unsigned CNT_W = $clog2(LATENCY + 1);

  logic [WORD_W-1:0] mem [2**ROW_W];
  logic [ROW_W-1:0]  row_q;
  logic [CNT_W-1:0]  cnt_q;

  always_ff @(posedge clk) begin
    if (load_we) mem[load_row] <= load_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= BOOT ? CNT_W'(LATENCY - 1) : '0;
      row_q <= '0;
    end else if (start) begin
      cnt_q <= CNT_W'(LATENCY - 1);
      row_q <= row;
    end else if (cnt_q != '0) begin
      cnt_q <= cnt_q - 1'b1;
    end
  end

  assign done  = (cnt_q == CNT_W'(1)) && !start;
  assign rdata = mem[row_q];

  initial assert (LATENCY >= 2) else $error("imem_bank: LATENCY must be at least 2");

endmodule
