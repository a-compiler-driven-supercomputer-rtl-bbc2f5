// prefetch_ring: the ROPE instruction controller, a ring of 2^n pre-fetch
// units, each with its own instruction memory bank.
//
// Instruction address A lives in bank A mod 2^n at row A / 2^n: the low n
// bits pick the unit and only the high part travels around the ring. The
// high part is passed unchanged from unit i to unit i+1, except from the
// last unit to unit 0, where it is incremented. Straight-line code is
// fetched by start-fetch tokens moving one unit to the right per cycle and
// executed by the single activate token following them; PRE-FETCH commands
// from the decoder reach the unit named by the low address bits through the
// top bus, and JUMP broadcasts a label to every unit. The ring ORs the
// outputs of the active unit onto the instruction bus and raises `stall`
// when the active unit has not finished its fetch.
//
// Reset leaves unit 0 holding the activate token and fetching address 0,
// as if a start-fetch had just reached it, so execution begins at address 0
// once that fetch completes (boot sequence and reset address are this
// design's choice). The program-reload bus writes any instruction address.
//
// Timing: a PRE-FETCH issued in cycle t makes its unit ready in cycle
// t + LATENCY, so a JUMP issued in cycle t + LATENCY - 1 executes the
// target in the next cycle without a freeze.
module prefetch_ring
  import rope_pkg::*;
#(
  parameter int unsigned NUNITS  = 32,
  parameter int unsigned AW      = IADDR_W,
  parameter int unsigned WORD_W  = INSTR_W,
  parameter int unsigned LATENCY = LAT_IFETCH
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               freeze,          // global freeze
  // control ops from the decoder (already qualified by issue)
  input  logic               prefetch,
  input  logic [AW-1:0]      prefetch_addr,
  input  logic [LABEL_W-1:0] prefetch_label,
  input  cmask_t             prefetch_mask,
  input  logic               jump,
  input  logic [LABEL_W-1:0] jump_label,
  input  logic [NCOND-1:0]   condition_bits,
  // instruction bus
  output logic [WORD_W-1:0]  instruction,
  output logic               instr_valid,
  output logic [AW-1:0]      instr_addr,
  output logic               stall,
  // external program-reload bus
  input  logic               load_we,
  input  logic [AW-1:0]      load_addr,
  input  logic [WORD_W-1:0]  load_data,
  // observation
  output logic [NUNITS-1:0]  unit_busy,
  output logic [NUNITS-1:0]  unit_target,
  output logic [NUNITS-1:0]  unit_active,
  output logic [NUNITS-1:0]  unit_fetch_start
);

  localparam int unsigned N_W  = $clog2(NUNITS);
  localparam int unsigned HI_W = AW - N_W;

  logic [HI_W-1:0]   a_right [NUNITS];
  logic [NUNITS-1:0] sf_right, act_right;
  logic [HI_W-1:0]   a_left  [NUNITS];
  logic [NUNITS-1:0] sf_left, act_left;
  logic [WORD_W-1:0] u_instr [NUNITS];
  logic [HI_W-1:0]   u_addr  [NUNITS];
  logic [NUNITS-1:0] u_valid, u_stall;
  for (genvar i = 0; i < NUNITS; i++) begin : g_unit
    localparam int unsigned L = (i + NUNITS - 1) % NUNITS;

    logic              ram_start, ram_done;
    logic [HI_W-1:0]   ram_row;
    logic [WORD_W-1:0] ram_data;
    logic              sel_top;

    if (i == 0) begin : g_wrap
      assign a_left[i]  = a_right[L] + 1'b1;
      assign sf_left[i] = sf_right[L];
    end else begin : g_pass
      assign a_left[i]  = a_right[L];
      assign sf_left[i] = sf_right[L];
    end
    assign act_left[i] = act_right[L];
    assign sel_top     = prefetch && (prefetch_addr[N_W-1:0] == N_W'(i));

    prefetch_unit #(
      .HI_W  (HI_W),
      .WORD_W(WORD_W),
      .BOOT  (i == 0)
    ) u_pf (
      .clk              (clk),
      .rst_n            (rst_n),
      .freeze           (freeze),
      .address_left     (a_left[i]),
      .start_fetch_left (sf_left[i]),
      .activate_left    (act_left[i]),
      .address_right    (a_right[i]),
      .start_fetch_right(sf_right[i]),
      .activate_right   (act_right[i]),
      .start_fetch_top  (sel_top),
      .address_top      (prefetch_addr[AW-1:N_W]),
      .prefetch_label   (prefetch_label),
      .condition_mask   (prefetch_mask),
      .jump             (jump),
      .jump_label       (jump_label),
      .condition_bits   (condition_bits),
      .instruction      (u_instr[i]),
      .instr_valid      (u_valid[i]),
      .stall            (u_stall[i]),
      .cur_address      (u_addr[i]),
      .ram_start        (ram_start),
      .ram_row          (ram_row),
      .ram_done         (ram_done),
      .ram_data         (ram_data),
      .busy             (unit_busy[i]),
      .target           (unit_target[i]),
      .active           (unit_active[i])
    );

    imem_bank #(
      .ROW_W  (HI_W),
      .WORD_W (WORD_W),
      .LATENCY(LATENCY),
      .BOOT   (i == 0)
    ) u_bank (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (ram_start),
      .row      (ram_row),
      .done     (ram_done),
      .rdata    (ram_data),
      .load_we  (load_we && (load_addr[N_W-1:0] == N_W'(i))),
      .load_row (load_addr[AW-1:N_W]),
      .load_data(load_data)
    );

    assign unit_fetch_start[i] = ram_start;
  end

  // instruction bus: the outputs of the (single) active unit
  always_comb begin
    instruction = '0;
    instr_addr  = '0;
    for (int i = 0; i < NUNITS; i++) begin
      if (unit_active[i]) begin
        instruction = instruction | u_instr[i];
        instr_addr  = instr_addr | {u_addr[i], N_W'(i)};
      end
    end
  end

  assign instr_valid = |u_valid;
  assign stall       = |u_stall;

  // exactly one unit holds the activate token
  a_one_active: assert property (@(posedge clk) disable iff (!rst_n) $onehot(unit_active))
    else $error("prefetch_ring: activate token lost or duplicated");

  initial assert (NUNITS == 2 ** N_W && NUNITS >= 2)
    else $error("prefetch_ring: NUNITS must be a power of two");

endmodule
