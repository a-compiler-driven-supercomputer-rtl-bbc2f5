// tb_prefetch_unit: directed checks of every rule of a single pre-fetch
// unit, with a behavioural RAM (fixed 6-cycle fetch, word = f(row)):
// left start-fetch on an idle unit and its announcement to the right one
// cycle later; ready after the fetch latency; activation of a ready unit and
// of a busy one (stall until ready); PRE-FETCH making the unit a target that
// ignores left tokens; top priority over left; JUMP with matching label and
// mask (activate), with a failing mask (revert and fetch address_left) and
// with another label (no effect); no refetch of the address already held;
// abort of a fetch in progress; a freeze blocking issue but neither token
// passing nor fetch completion.
module tb_prefetch_unit;
  import rope_pkg::*;
  localparam int HI_W = 8, W = 32, LAT = 6;
  logic clk = 0, rst_n = 0, freeze = 0;
  logic [HI_W-1:0] address_left = 0, address_right, address_top = 0, cur_address, ram_row;
  logic start_fetch_left = 0, activate_left = 0, start_fetch_right, activate_right;
  logic start_fetch_top = 0, jump = 0;
  logic [LABEL_W-1:0] prefetch_label = 0, jump_label = 0;
  cmask_t condition_mask = '0;
  logic [NCOND-1:0] condition_bits = 0;
  logic [W-1:0] instruction, ram_data;
  logic instr_valid, stall, ram_start, ram_done, busy, target, active;
  int checks = 0, failures = 0;
  int ram_starts = 0;

  prefetch_unit #(.HI_W(HI_W), .WORD_W(W), .BOOT(0)) dut (.*);
  always #5 clk = ~clk;

  // behavioural RAM
  int cnt = 0;
  logic [HI_W-1:0] rrow;
  always @(posedge clk) begin
    if (ram_start) begin cnt <= LAT - 1; rrow <= ram_row; ram_starts++; end
    else if (cnt > 0) cnt <= cnt - 1;
  end
  assign ram_done = (cnt == 1) && !ram_start;
  assign ram_data = {24'hC0DE00, rrow};

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic idle_inputs();
    start_fetch_left = 0; activate_left = 0; start_fetch_top = 0; jump = 0; freeze = 0;
  endtask

  task automatic step(); @(negedge clk); #1; endtask

  // wait for the fetch started in the last cycle: ready after LAT cycles
  task automatic wait_ready(input int already);
    for (int k = already; k < LAT; k++) begin
      chk(busy, "busy during fetch");
      step();
    end
    chk(!busy, "ready after fetch latency");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    step();
    chk(!busy && !target && !active && !stall, "idle after reset");

    // 1. left start-fetch on an idle unit
    address_left = 8'h21; start_fetch_left = 1; #1;
    chk(ram_start && ram_row == 8'h21, "left start-fetch starts the bank");
    step(); idle_inputs();
    chk(start_fetch_right && address_right == 8'h21, "start-fetch.right one cycle later");
    step();
    chk(!start_fetch_right, "start-fetch.right is one pulse");
    wait_ready(2);
    chk(instruction == {24'hC0DE00, 8'h21}, "fetched word");

    // 2. activation of a ready unit
    activate_left = 1; step(); idle_inputs(); #1;
    chk(active && instr_valid && !stall && activate_right, "ready unit issues and passes the token");
    step();
    chk(!active && !activate_right, "token passed on");

    // 3. same address: no refetch, still announced
    address_left = 8'h21; start_fetch_left = 1; #1;
    chk(!ram_start, "no refetch of held address");
    step(); idle_inputs();
    chk(start_fetch_right && !busy, "token passes without refetch");

    // 4. abort: new address while busy
    address_left = 8'h30; start_fetch_left = 1; step(); idle_inputs();
    step(); step();
    address_left = 8'h31; start_fetch_left = 1; #1;
    chk(ram_start && ram_row == 8'h31, "fetch aborted by new start-fetch");
    step(); idle_inputs();
    // activation while busy: stall until ready
    activate_left = 1; step(); idle_inputs();
    for (int k = 2; k < LAT; k++) begin
      chk(active && stall && !instr_valid, "busy active unit freezes");
      step();
    end
    chk(active && !stall && instr_valid && instruction[7:0] == 8'h31, "issues the new word after the freeze");
    step();

    // 5. PRE-FETCH: target, left ignored; top priority over left
    start_fetch_top = 1; address_top = 8'h40; prefetch_label = 2'd1;
    condition_mask = '{care: 8'b0000_0011, value: 8'b0000_0001};
    start_fetch_left = 1; address_left = 8'h50; #1;
    chk(ram_start && ram_row == 8'h40, "top has priority over left");
    step(); idle_inputs();
    chk(target && address_right == 8'h40 && start_fetch_right, "target, announced right");
    address_left = 8'h51; start_fetch_left = 1; #1;
    chk(!ram_start, "target ignores left start-fetch");
    step(); idle_inputs();
    chk(!start_fetch_right, "ignored token is not passed on");
    wait_ready(2);
    // JUMP with another label: nothing happens
    jump = 1; jump_label = 2'd2; condition_bits = 8'b01; step(); idle_inputs();
    chk(target && !active, "other label ignored");
    // JUMP with matching label and mask: activate
    jump = 1; jump_label = 2'd1; condition_bits = 8'b1111_0101; step(); idle_inputs(); #1;
    chk(active && !target && instr_valid && instruction[7:0] == 8'h40, "matching jump activates target");
    chk(activate_right, "target issues in the next cycle");
    step();

    // 6. JUMP with failing mask: revert and fetch address_left
    start_fetch_top = 1; address_top = 8'h60; prefetch_label = 2'd3;
    condition_mask = '{care: 8'b0000_0100, value: 8'b0000_0100};
    step(); idle_inputs();
    repeat (LAT) step();
    address_left = 8'h70; jump = 1; jump_label = 2'd3; condition_bits = 8'b0; #1;
    chk(ram_start && ram_row == 8'h70, "failing mask: fetch address_left");
    step(); idle_inputs();
    chk(!target && !active && start_fetch_right && address_right == 8'h70, "reverted to non-target");

    // 7. freeze: token passing held, fetch completes
    step();
    freeze = 1; address_left = 8'h71; start_fetch_left = 1; #1;
    chk(ram_start, "start-fetch token accepted during freeze");
    step(); start_fetch_left = 0;
    chk(start_fetch_right && address_right == 8'h71, "token passed on during freeze");
    activate_left = 1;
    repeat (LAT) step();
    chk(!busy && active && instr_valid && !activate_right, "fetch completes, no issue during freeze");
    freeze = 0; activate_left = 0; #1;
    chk(activate_right && instruction[7:0] == 8'h71, "issues once the freeze ends");
    step();
    chk(!active, "token passed after issue");

    $display("RAM starts: %0d", ram_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
