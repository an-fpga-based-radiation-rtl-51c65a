// tb_tile_manager: drives the manager with Health_Tile reports, scrubber
// reports and task pulses, and plays the configuration engine (fixed
// latency) and the multiplexer acknowledge. It checks the initial full
// load, the round-robin choice of spares, the triad sent out with the
// synchronisation flag, repair only on the Repair Tile task, the fault
// counters, fault injection on active slots in turn, the blind scrub, the
// deferred move when no spare is left, and the filter on single-sample health.
module tb_tile_manager;
  import artemis_pkg::*;
  logic clk = 0, rst;
  health_t health;
  logic upd_ack, upd_valid;
  triad_t upd_triad;
  logic [N_TILES-1:0] upd_sync;
  logic scrub_fault; tile_idx_t scrub_tile;
  logic task_move, task_repair, task_inject, task_scrub, inject_bad;
  logic cfg_req, cfg_program, cfg_busy, cfg_done, cfg_err;
  bs_kind_t cfg_kind; tile_idx_t cfg_tile;
  logic ready, init_failed, spare_avail, repair_busy;
  triad_t triad; tile_idx_t next_spare;
  logic [N_TILES-1:0] faulted, active;
  logic [15:0] total_faults, injected_faults;
  logic [N_TILES-1:0][15:0] tile_faults;
  int checks = 0, failures = 0;

  tile_manager #(.HOLDOFF(4)) dut (.*);
  always #5 clk = ~clk;

  // configuration engine stand-in: busy for 30 clocks, then done
  int busy_left = 0;
  int n_req = 0;
  bs_kind_t last_kind; tile_idx_t last_tile; logic last_prog;
  always @(posedge clk) begin
    cfg_done <= 1'b0;
    if (cfg_req && !rst) begin
      busy_left <= 30; n_req++;
      last_kind <= cfg_kind; last_tile <= cfg_tile; last_prog <= cfg_program;
    end else if (busy_left == 1) begin busy_left <= 0; cfg_done <= 1'b1; end
    else if (busy_left > 0) busy_left <= busy_left - 1;
  end
  assign cfg_busy = (busy_left > 0);
  assign cfg_err  = 1'b0;

  // multiplexer stand-in: acknowledge 5 clocks after an update
  int ack_in = 0;
  int n_upd = 0;
  always @(posedge clk) begin
    upd_ack <= 1'b0;
    if (upd_valid && !rst) begin ack_in <= 5; n_upd++; end
    else if (ack_in == 1) begin ack_in <= 0; upd_ack <= 1'b1; end
    else if (ack_in > 0) ack_in <= ack_in - 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (triad %0d%0d%0d)", what, triad[2], triad[1], triad[0]); end
  endtask

  task automatic pulse(ref logic s);
    @(posedge clk); #1 s = 1; @(posedge clk); #1 s = 0;
  endtask

  // report a fault in slot s until the manager sends a new triad
  task automatic fault_slot(int s);
    @(posedge clk); #1 health = health_t'(s);
    for (int c = 0; c < 100 && !upd_valid; c++) @(posedge clk);
    #1 health = HEALTH_OK;
    repeat (20) @(posedge clk); #1;
  endtask

  task automatic idle(int n); repeat (n) @(posedge clk); #1; endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int prev;
    rst = 1; health = HEALTH_OK; scrub_fault = 0; scrub_tile = '0;
    task_move = 0; task_repair = 0; task_inject = 0; task_scrub = 0; inject_bad = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    idle(2);
    chk(cfg_busy && last_kind == BS_FULL_GOOD && last_prog, "initial full load requested");
    idle(60);
    chk(ready && triad == {4'd2, 4'd1, 4'd0} && next_spare == 4'd3, "start triad 2-1-0, next spare 3");

    // a single-sample glitch on health is ignored
    @(posedge clk); #1 health = HEALTH_SLOT1; @(posedge clk); #1 health = HEALTH_OK;
    idle(20);
    chk(n_upd == 0 && total_faults == 0, "glitch ignored");

    // fault in slot 1 (tile 1): tile 3 replaces it
    fault_slot(1);
    chk(triad == {4'd2, 4'd3, 4'd0} && upd_triad == triad && upd_sync == 9'b000001000, "tile 3 in slot 1");
    chk(faulted == 9'b000000010 && tile_faults[1] == 1 && total_faults == 1, "tile 1 faulted");
    chk(next_spare == 4'd4, "next spare 4");
    // no repair until the Repair Tile task
    prev = n_req;
    idle(50);
    chk(n_req == prev, "repair waits for task");
    pulse(task_repair);
    idle(3);
    chk(cfg_busy && last_kind == BS_PART_GOOD && last_tile == 4'd1 && !last_prog, "repair tile 1 requested");
    idle(40);
    chk(faulted == 0 && !active[1], "tile 1 spare again");

    // walk the triad round robin: faults in slot 0, 2, 0 ... as on the status screens
    fault_slot(0);  chk(triad == {4'd2, 4'd3, 4'd4}, "tile 4 in slot 0");
    fault_slot(2);  chk(triad == {4'd5, 4'd3, 4'd4}, "tile 5 in slot 2");
    fault_slot(1);  chk(triad == {4'd5, 4'd6, 4'd4}, "tile 6 in slot 1");
    fault_slot(0);  chk(triad == {4'd5, 4'd6, 4'd7}, "tile 7 in slot 0");
    fault_slot(2);  chk(triad == {4'd8, 4'd6, 4'd7}, "tile 8 in slot 2");
    chk(next_spare == 4'd1, "next spare wraps to 1");
    chk(total_faults == 6 && tile_faults[0] == 1 && tile_faults[2] == 1, "fault counts");

    // repair the five faulted tiles, one per Repair Tile task
    for (int i = 0; i < 5; i++) begin pulse(task_repair); idle(45); end
    chk(faulted == 0, "walk repaired");

    // scrubber finds a spare faulted: marked, no move
    prev = n_upd;
    @(posedge clk); #1 scrub_tile = 4'd1; scrub_fault = 1; @(posedge clk); #1 scrub_fault = 0;
    idle(5);
    chk(faulted[1] && n_upd == prev, "spare scrub fault");
    // scrubber finds an active tile faulted: moved
    @(posedge clk); #1 scrub_tile = 4'd6; scrub_fault = 1; @(posedge clk); #1 scrub_fault = 0;
    idle(30);
    chk(faulted[6] && triad[1] != 4'd6 && !faulted[triad[1]], "active scrub fault moved");

    // repair everything that is faulted, one per task
    for (int i = 0; i < 9 && faulted != 0; i++) begin pulse(task_repair); idle(45); pulse(task_move); idle(30); end
    chk(faulted == 0, "all repaired");

    // fault injection: slot 0, then slot 1 of the triad, clean then corrupted
    prev = injected_faults;
    inject_bad = 0; pulse(task_inject); idle(3);
    chk(last_kind == BS_PART_GOOD && last_tile == triad[0], "inject slot 0");
    idle(40);
    inject_bad = 1; pulse(task_inject); inject_bad = 0; idle(3);
    chk(last_kind == BS_PART_BAD && last_tile == triad[1], "inject bad slot 1");
    idle(40);
    chk(injected_faults == prev + 2, "injected count");

    // blind scrub: full bitstream without PROGRAM_B
    pulse(task_scrub); idle(3);
    chk(last_kind == BS_FULL_GOOD && !last_prog, "blind scrub");
    idle(40);

    // exhaust the spares: six faults in a row without repairs
    for (int i = 0; i < 6; i++) fault_slot(i % 3);
    chk(!spare_avail && faulted != 0, "no spare left");
    prev = n_upd;
    fault_slot(0);
    chk(n_upd == prev, "move deferred without spare");
    // a repair makes a spare; the Move Tile task then completes the move
    pulse(task_repair); idle(45);
    pulse(task_move); idle(30);
    chk(n_upd == prev + 1, "deferred move done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
