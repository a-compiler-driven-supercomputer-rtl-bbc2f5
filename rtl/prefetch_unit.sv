// prefetch_unit: one element of the ROPE instruction pre-fetch ring.
//
// A unit fetches one instruction from its own memory bank and hands it to
// the instruction bus when the activate token reaches it. Its state follows
// the architecture: `busy` (a fetch is under way) and `target` (the fetch was
// requested by an explicit PRE-FETCH, so the unit waits for a labelled JUMP
// instead of following its left neighbour). This design adds `holding` (the
// unit has started a fetch since reset, so it is not idle) and `active`
// (it holds the activate token).
//
// Behaviour, one clock edge at a time:
//  * start_fetch_top (PRE-FETCH addressed to this unit) makes the unit a
//    target, stores the jump label and condition mask and fetches
//    address_top. It has priority over start_fetch_left.
//  * start_fetch_left starts a fetch of address_left on a non-target unit
//    and is ignored by a target unit. A fetch in progress is aborted.
//  * A JUMP whose label matches a target unit compares the condition bits
//    with the stored mask. On a match the unit takes the activate token (and
//    stops being a target); otherwise it becomes a non-target and fetches
//    address_left.
//  * Every started fetch is announced to the right neighbour one cycle
//    later on start_fetch_right / address_right.
//  * An active, ready unit drives its instruction on the bus; in the cycle
//    it issues, activate_right tells the right neighbour to take the token
//    on the same clock edge, unless that instruction is a JUMP.
//  * An active unit that is still fetching raises `stall`, which freezes
//    the processor until the fetch is done.
// A fetch of the address the unit already holds or is fetching does not
// restart the bank (the architecture relies on this in its loop example).
// A freeze stops only issue and with it the activate token; start-fetch
// tokens keep moving and fetches keep completing, so straight-line code is
// fetched ahead while the processor waits (as in the architecture's example
// schedule, where fetching proceeds across the ring before the first
// instruction executes). PRE-FETCH and JUMP arrive qualified by issue.
module prefetch_unit
  import rope_pkg::*;
#(
  parameter int unsigned HI_W   = 11,     // high address bits passed around the ring
  parameter int unsigned WORD_W = INSTR_W,
  parameter bit          BOOT   = 1'b0    // after reset: active, fetching address 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               freeze,
  // ring, left side
  input  logic [HI_W-1:0]    address_left,
  input  logic               start_fetch_left,
  input  logic               activate_left,
  // ring, right side
  output logic [HI_W-1:0]    address_right,
  output logic               start_fetch_right,
  output logic               activate_right,
  // instruction buses (top)
  input  logic               start_fetch_top,
  input  logic [HI_W-1:0]    address_top,
  input  logic [LABEL_W-1:0] prefetch_label,
  input  cmask_t             condition_mask,
  input  logic               jump,
  input  logic [LABEL_W-1:0] jump_label,
  input  logic [NCOND-1:0]   condition_bits,
  output logic [WORD_W-1:0]  instruction,
  output logic               instr_valid,   // active and ready
  output logic               stall,         // active and not ready: freeze
  output logic [HI_W-1:0]    cur_address,
  // RAM side
  output logic               ram_start,
  output logic [HI_W-1:0]    ram_row,
  input  logic               ram_done,
  input  logic [WORD_W-1:0]  ram_data,
  // observation of state
  output logic               busy,
  output logic               target,
  output logic               active
);

  logic               holding_q;
  logic [HI_W-1:0]    addr_q;
  logic [WORD_W-1:0]  instr_q;
  logic [LABEL_W-1:0] label_q;
  cmask_t             mask_q;
  logic               sf_right_q;
  logic [HI_W-1:0]    a_right_q;

  logic               jump_hit;     // JUMP with our label while we are a target
  logic               jump_match;   // ... and the condition mask matches
  logic               want_fetch;
  logic [HI_W-1:0]    fetch_addr;
  logic               issue;

  assign jump_hit   = jump && target && (jump_label == label_q);
  assign jump_match = jump_hit && cmask_match(mask_q, condition_bits);
  assign issue      = active && holding_q && !busy && !freeze;

  always_comb begin
    want_fetch = 1'b0;
    fetch_addr = address_left;
    if (start_fetch_top) begin
      want_fetch = 1'b1;
      fetch_addr = address_top;
    end else if (jump_hit && !jump_match) begin
      want_fetch = 1'b1;
    end else if (start_fetch_left && !target) begin
      want_fetch = 1'b1;
    end
  end

  // the bank is restarted only for a new address
  assign ram_start = want_fetch && !(holding_q && addr_q == fetch_addr);
  assign ram_row   = fetch_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= BOOT;
      target     <= 1'b0;
      active     <= BOOT;
      holding_q  <= BOOT;
      addr_q     <= '0;
      instr_q    <= '0;
      label_q    <= '0;
      mask_q     <= '0;
      sf_right_q <= BOOT;
      a_right_q  <= '0;
    end else begin
      if (ram_done && !ram_start) begin
        busy    <= 1'b0;
        instr_q <= ram_data;
      end
      if (ram_start) begin
        busy      <= 1'b1;
        holding_q <= 1'b1;
        addr_q    <= fetch_addr;
      end
      sf_right_q <= want_fetch;
      if (want_fetch) a_right_q <= fetch_addr;
      if (start_fetch_top) begin
        target  <= 1'b1;
        label_q <= prefetch_label;
        mask_q  <= condition_mask;
      end else if (jump_hit) begin
        target <= 1'b0;
      end
      // activate token
      if (jump_match)         active <= 1'b1;
      else if (issue)         active <= 1'b0;
      else if (activate_left) active <= 1'b1;
    end
  end

  assign instruction       = instr_q;
  assign instr_valid       = active && holding_q && !busy;
  assign stall             = active && (busy || !holding_q);
  assign activate_right    = issue && !jump;
  assign start_fetch_right = sf_right_q;
  assign address_right     = a_right_q;
  assign cur_address       = addr_q;

endmodule
