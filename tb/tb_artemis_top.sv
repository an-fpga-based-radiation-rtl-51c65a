// tb_artemis_top: the whole computer at its default parameters (20 MHz
// control clock, 10 MHz voter clock, one scheduler second = 20 M clocks,
// real bitstream sizes). Around it: an SD card model holding the bitstreams,
// a model of the experiment FPGA's configuration port, a MAX6627 model and a
// data writer. The scheduler is reprogrammed through its slot port so that
// the long mission periods become seconds.
// Sequence: initial configuration (the whole 9.7 MB bitstream); one
// data-file write with the card switch; clean fault injection (voter
// detects, spare moved in and synchronised, faulted tile repaired);
// corrupted-bitstream injection and repair; scrubber reports on a spare and on
// an active tile (marked, moved); the start of a blind scrub, whose first
// 64 KB are checked; temperature reads and the software task pulses. Every mechanism is counted and must occur; the
// voted count must keep advancing and the three active outputs must agree
// whenever no fault is being handled.
module tb_artemis_top;
  import artemis_pkg::*;

  logic clk_ctrl = 0, clk_voter = 0, rst_ctrl, rst_tb_v;
  logic [N_TILES-1:0] tile_cfg_rst;
  logic smap_program_b, smap_init_b, smap_csi_b, smap_rdwr_b, smap_cclk, smap_done;
  logic [7:0] smap_d;
  logic cfg_sd_cs_n, cfg_sd_sck, cfg_sd_mosi, cfg_sd_miso;
  logic temp_cs_n, temp_sck, temp_so;
  logic data_pass_thru, data_sd_pwr_en, data_write_grant, data_write_done;
  logic scrub_fault; tile_idx_t scrub_tile;
  logic inject_bad;
  logic sched_we, sched_enable; logic [3:0] sched_slot; logic [19:0] sched_period;
  tile_word_t [N_ACTIVE-1:0] active_out_v;
  tile_word_t voted_v;
  health_t health_v;
  logic no_majority_v, tile_clk_v;
  triad_t triad_v, triad;
  logic ready, init_failed, sd_init_err, cfg_err;
  tile_idx_t next_spare;
  logic [N_TILES-1:0] faulted;
  logic [15:0] total_faults, injected_faults, task_overruns;
  logic [N_TILES-1:0][15:0] tile_faults;
  logic signed [12:0] die_temp;
  logic die_temp_valid, task_power_meas, task_power_logs, task_active_upd, task_watchdog;
  logic design_rst, rst_voter;

  int checks = 0, failures = 0;

  assign rst_voter = rst_tb_v | design_rst;

  artemis_top dut (.*);
  sd_card_model card (.cs_n(cfg_sd_cs_n), .sck(cfg_sd_sck), .mosi(cfg_sd_mosi), .miso(cfg_sd_miso));
  artix_cfg_model fpga (.clk_voter, .program_b(smap_program_b), .init_b(smap_init_b),
    .csi_b(smap_csi_b), .rdwr_b(smap_rdwr_b), .cclk(smap_cclk), .d(smap_d), .done(smap_done),
    .design_rst, .tile_rst(tile_cfg_rst));
  max6627_model sensor (.cs_n(temp_cs_n), .sck(temp_sck), .so(temp_so), .temp_q4(13'sd600));

  always #25 clk_ctrl  = ~clk_ctrl;   // 20 MHz
  always #50 clk_voter = ~clk_voter;  // 10 MHz

  // ---------------- mechanism counters ----------------
  int n_moves = 0, n_syncs = 0, n_health = 0, n_temp = 0, n_grant = 0;
  int n_pmeas = 0, n_plogs = 0, n_active = 0, n_wdog = 0, n_cfgerr = 0;
  logic grant_q = 0;
  triad_t triad_q;
  always @(posedge clk_ctrl) if (!rst_ctrl) begin
    triad_q <= triad;
    if (ready && triad != triad_q) n_moves++;
    if (die_temp_valid) begin
      n_temp++;
      if (die_temp != 13'sd600) begin failures++; $display("FAIL temperature %0d", die_temp); end
      checks++;
    end
    grant_q <= data_write_grant;
    if (data_write_grant && !grant_q) n_grant++;
    if (task_power_meas) n_pmeas++;
    if (task_power_logs) n_plogs++;
    if (task_active_upd) n_active++;
    if (task_watchdog)   n_wdog++;
    if (cfg_err) n_cfgerr++;
  end
  always @(posedge clk_voter) if (!rst_voter) begin
    if (dut.tile_load != 0) n_syncs++;
    if (health_v != HEALTH_OK) n_health++;
  end

  // data writer: finishes 1000 clocks after it is granted the card
  always @(posedge clk_ctrl) begin
    data_write_done <= 1'b0;
    if (data_write_grant && !grant_q) fork begin
      repeat (1000) @(posedge clk_ctrl);
      data_write_done <= 1'b1;
    end join_none
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic sched(int slot, int period, bit en);
    @(posedge clk_ctrl); #1 sched_we = 1; sched_slot = 4'(slot); sched_period = 20'(period); sched_enable = en;
    @(posedge clk_ctrl); #1 sched_we = 0;
  endtask

  // wait for a condition, polled every 256 control clocks, within a budget
  // of n control clocks
  `define WAIT_FOR(cond, n, what) \
    begin longint c_ = 0; while (!(cond) && c_ < (n)) begin repeat (256) @(posedge clk_ctrl); c_ += 256; end \
    #1 chk(cond, what); end

  // triad healthy: all three outputs agree and voter reports no fault
  task automatic check_healthy(string what);
    repeat (200) @(posedge clk_voter);
    #1;
    chk(health_v == HEALTH_OK && active_out_v[0] == active_out_v[1] &&
        active_out_v[1] == active_out_v[2] && triad_v == triad, what);
  endtask

  initial begin
    #30s;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    tile_word_t v0;
    int moves0;
    rst_ctrl = 1; rst_tb_v = 1; scrub_fault = 0; scrub_tile = '0; inject_bad = 0;
    sched_we = 0; sched_enable = 0; sched_slot = '0; sched_period = '0;
    repeat (4) @(posedge clk_voter); #1 rst_ctrl = 0; rst_tb_v = 0;

    // ---- initial configuration ----
    `WAIT_FOR(ready, 200_000_000, "initial configuration")
    $display("configured at %0t", $time);
    chk(fpga.loads_full == 1 && !sd_init_err && !init_failed, "full bitstream loaded once");
    chk(triad == {4'd2, 4'd1, 4'd0} && next_spare == 4'd3, "triad 2-1-0, next spare 3");
    // keep the software tasks short; stop the long ones from interfering
    sched(2, 2, 1);      // power measurement every 2 s
    sched(3, 3, 1);      // power logs every 3 s
    sched(6, 2, 1);      // watchdog every 2 s
    sched(5, 1, 1);      // data file every 1 s, disabled after the first
    check_healthy("healthy after configuration");
    v0 = voted_v;

    // ---- data file write ----
    `WAIT_FOR(n_grant == 1, 25_000_000, "data card granted")
    sched(5, 0, 0);
    chk(data_pass_thru && data_sd_pwr_en, "pass-thru mode while granted");
    `WAIT_FOR(!data_pass_thru && data_sd_pwr_en && !data_write_grant, 2_000_000, "card reader restored")

    // ---- clean fault injection ----
    moves0 = n_moves;
    sched(7, 1, 1);
    `WAIT_FOR(injected_faults == 1, 25_000_000, "injection started")
    sched(7, 0, 0);
    `WAIT_FOR(total_faults == 1, 25_000_000, "injected fault detected by the voter")
    `WAIT_FOR(n_moves == moves0 + 1 && triad_v == triad, 100_000, "spare moved in")
    check_healthy("triad healthy after the move");
    chk(triad[0] == 4'd3 && faulted == 9'b000000001, "tile 3 replaced tile 0");
    `WAIT_FOR(faulted == 0, 80_000_000, "tile 0 repaired")
    chk(fpga.loads_good == 2 && fpga.errors == 0, "two clean partial loads checked");

    // ---- corrupted-bitstream injection: slot 1 ----
    inject_bad = 1;
    sched(7, 1, 1);
    `WAIT_FOR(injected_faults == 2, 25_000_000, "bad injection started")
    sched(7, 0, 0);
    inject_bad = 0;
    `WAIT_FOR(total_faults == 2, 30_000_000, "bad bitstream detected")
    check_healthy("triad healthy after the second move");
    chk(faulted == 9'b000000010 && fpga.loads_bad == 1, "tile 1 faulted by the bad bitstream");
    `WAIT_FOR(faulted == 0, 80_000_000, "tile 1 repaired with the clean bitstream")
    repeat (10) @(posedge clk_voter); #1;
    chk(tile_cfg_rst == 0, "no tile held in reset");

    // ---- configuration scrubber reports: a spare, then an active tile ----
    @(posedge clk_ctrl); #1 scrub_tile = 4'd6; scrub_fault = 1; @(posedge clk_ctrl); #1 scrub_fault = 0;
    repeat (10) @(posedge clk_ctrl);
    chk(faulted[6] && total_faults == 3, "spare tile 6 marked faulted");
    @(posedge clk_ctrl); #1 scrub_tile = triad[2]; scrub_fault = 1; @(posedge clk_ctrl); #1 scrub_fault = 0;
    `WAIT_FOR(total_faults == 4 && triad_v == triad, 100_000, "active tile moved on scrubber report")
    check_healthy("triad healthy after scrubber move");

    // ---- blind scrub: its first 64 KB are checked, then the run ends ----
    sched(1, 0, 0);      // no further repairs, so the scrub is next on the port
    sched(8, 1, 1);
    `WAIT_FOR(dut.u_mgr.job == 2'd3, 45_000_000, "blind scrub started")
    sched(8, 0, 0);
    `WAIT_FOR(fpga.nbytes > 65536, 2_000_000, "blind scrub streaming")
    chk(fpga.kind == 0 && fpga.errors == 0 && smap_program_b && !design_rst, "scrub without PROGRAM_B, design running");
    check_healthy("healthy during blind scrub");

    // ---- summary ----
    chk(voted_v != v0, "voted count advances");
    chk(n_syncs == 3, "one synchronising load per move");
    chk(n_moves == 3 && n_health > 0, "moves and voter reports");
    chk(n_temp > 0 && n_pmeas > 0 && n_plogs > 0 && n_wdog > 0 && n_active > 0, "software task pulses");
    chk(n_cfgerr == 0, "no configuration errors");
    chk(tile_faults[0] == 1 && tile_faults[1] == 1 && tile_faults[6] == 1, "per-tile counts");
    $display("mechanisms: full loads %0d, blind scrub running %0d, clean partial %0d, bad partial %0d, moves %0d, syncs %0d, voter fault cycles %0d, injections %0d, data grants %0d, temperature reads %0d, power meas %0d, power logs %0d, watchdog %0d, active update %0d",
      fpga.loads_full, (dut.u_mgr.job == 2'd3), fpga.loads_good, fpga.loads_bad, n_moves, n_syncs,
      n_health, injected_faults, n_grant, n_temp, n_pmeas, n_plogs, n_wdog, n_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
