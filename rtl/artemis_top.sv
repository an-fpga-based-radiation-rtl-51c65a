// artemis_top: radiation tolerant computer, TMR+Scrubbing+Spares.
//
// Two FPGAs share the work. The experiment FPGA (Artix-7, 10 MHz domain
// clk_voter) holds nine identical tiles, a multiplexer that picks the three
// active tiles and a majority voter. The control FPGA (Spartan-6, 20 MHz
// domain clk_ctrl) holds the tile manager, the SelectMAP configuration engine
// with its SD card reader and bitstream table, the periodic task scheduler,
// the die temperature reader and the data-card mode switch.
//
// Operation: after reset the control side initialises the SD card and
// configures the experiment FPGA with the full bitstream. Tiles 0, 1 and 2
// then run as the triad. When the voter reports a slot whose tile disagrees,
// the manager marks that tile faulted, brings the next spare into the triad
// (synchronised to the voted count on a tile tick) and, on the next Repair
// Tile task, rewrites the faulted tile's region with its partial bitstream,
// after which the tile is a spare again. Fault injection and blind scrubbing
// are scheduled tasks that use the same configuration path.
//
// Clock domains: health crosses to clk_ctrl through a 2-flop synchroniser
// (the manager ignores a value seen only once); triad updates cross as a
// toggle pulse with the triad held stable by the manager until the
// multiplexer acknowledges. Outputs named *_v are in the clk_voter domain,
// the rest in clk_ctrl.
//
// Parts outside this RTL connect through ports: the clock generators (the
// 100 MHz oscillator divided by vendor clock blocks into clk_voter and
// clk_ctrl), the configuration memory and partial reconfiguration logic of
// the experiment FPGA (SelectMAP pins in, tile_cfg_rst back: a partially
// reconfigured tile restarts), the configuration-memory scrubber (scrub_fault),
// both SD cards, the MAX14502 card switch and the MAX6627 sensor.
// The periodic tasks that belong to software (power measurement and logs,
// watchdog, active tiles report) are brought out as one-clock pulses, as are
// the data-file write grant and its done input.
module artemis_top
  import artemis_pkg::*;
#(
  parameter int unsigned SCHED_CLK_HZ = 20_000_000,  // clk_ctrl cycles per second
  parameter int unsigned TILE_DIV     = 64,          // 10 MHz to 156.25 kHz
  parameter int unsigned SD_SLOW_HALF = 25,
  parameter int unsigned SD_FAST_HALF = 1,
  parameter int unsigned TEMP_PERIOD  = 10_000_000,
  parameter int unsigned MODE_DELAY   = 200_000,
  parameter int unsigned HOLDOFF      = 16
) (
  input  logic                      clk_ctrl,
  input  logic                      rst_ctrl,
  input  logic                      clk_voter,
  input  logic                      rst_voter,       // external reset of the experiment FPGA design
  input  logic [N_TILES-1:0]        tile_cfg_rst,    // per-tile auxiliary reset (partial reconfiguration)
  // SelectMAP port of the experiment FPGA
  output logic                      smap_program_b,
  input  logic                      smap_init_b,
  output logic                      smap_csi_b,
  output logic                      smap_rdwr_b,
  output logic                      smap_cclk,
  output logic [7:0]                smap_d,
  input  logic                      smap_done,
  // configuration SD card (SPI)
  output logic                      cfg_sd_cs_n,
  output logic                      cfg_sd_sck,
  output logic                      cfg_sd_mosi,
  input  logic                      cfg_sd_miso,
  // MAX6627 temperature sensor
  output logic                      temp_cs_n,
  output logic                      temp_sck,
  input  logic                      temp_so,
  // data card switch (MAX14502) and data writer
  output logic                      data_pass_thru,
  output logic                      data_sd_pwr_en,
  output logic                      data_write_grant,
  input  logic                      data_write_done,
  // configuration scrubber report
  input  logic                      scrub_fault,
  input  tile_idx_t                 scrub_tile,
  // fault injection uses the corrupted partial bitstream when set
  input  logic                      inject_bad,
  // scheduler slot programming
  input  logic                      sched_we,
  input  logic [3:0]                sched_slot,
  input  logic [19:0]               sched_period,
  input  logic                      sched_enable,
  // experiment FPGA outputs (clk_voter domain)
  output tile_word_t [N_ACTIVE-1:0] active_out_v,
  output tile_word_t                voted_v,
  output health_t                   health_v,
  output logic                      no_majority_v,
  output logic                      tile_clk_v,
  output triad_t                    triad_v,         // triad in force in the multiplexer
  // control side status (clk_ctrl domain)
  output logic                      ready,
  output logic                      init_failed,
  output logic                      sd_init_err,
  output logic                      cfg_err,
  output triad_t                    triad,
  output tile_idx_t                 next_spare,
  output logic [N_TILES-1:0]        faulted,
  output logic [15:0]               total_faults,
  output logic [15:0]               injected_faults,
  output logic [N_TILES-1:0][15:0]  tile_faults,
  output logic signed [12:0]        die_temp,
  output logic                      die_temp_valid,
  output logic                      task_power_meas,
  output logic                      task_power_logs,
  output logic                      task_active_upd,
  output logic                      task_watchdog,
  output logic [15:0]               task_overruns
);

  // ------------------------------------------------------------------
  // experiment FPGA: tiles, multiplexer, voter
  // ------------------------------------------------------------------
  logic                     tick;
  tile_word_t [N_TILES-1:0] tile_out;
  logic [N_TILES-1:0]       tile_load;
  logic                     upd_valid_v, upd_done_v;

  // managed in clk_ctrl, held stable while a triad change crosses
  logic                     upd_valid_c, upd_ack_c;
  triad_t                   upd_triad_c;
  logic [N_TILES-1:0]       upd_sync_c;

  tile_clk_div #(.DIV(TILE_DIV)) u_div (
    .clk(clk_voter), .rst(rst_voter), .tick(tick), .tile_clk(tile_clk_v)
  );

  for (genvar t = 0; t < N_TILES; t++) begin : g_tile
    tmr_tile u_tile (
      .clk(clk_voter), .aux_rst(tile_cfg_rst[t]), .ext_rst(rst_voter),
      .tick(tick), .load(tile_load[t]), .load_value(voted_v), .count(tile_out[t])
    );
  end

  tile_mux u_mux (
    .clk(clk_voter), .rst(rst_voter), .tick(tick), .tile_out(tile_out),
    .upd_valid(upd_valid_v), .upd_triad(upd_triad_c), .upd_sync(upd_sync_c),
    .upd_done(upd_done_v), .triad(triad_v), .load(tile_load), .active_out(active_out_v)
  );

  tmr_voter u_voter (
    .clk(clk_voter), .rst(rst_voter), .in(active_out_v),
    .voted(voted_v), .health_tile(health_v), .no_majority(no_majority_v)
  );

  // ------------------------------------------------------------------
  // crossings
  // ------------------------------------------------------------------
  logic [1:0] health_c;

  cdc_sync #(.W(2), .RESET_VALUE(2'd3)) u_health_sync (
    .clk(clk_ctrl), .rst(rst_ctrl), .d(health_v), .q(health_c)
  );
  cdc_pulse u_upd_to_voter (
    .src_clk(clk_ctrl), .src_rst(rst_ctrl), .src_pulse(upd_valid_c),
    .dst_clk(clk_voter), .dst_rst(rst_voter), .dst_pulse(upd_valid_v)
  );
  cdc_pulse u_ack_to_ctrl (
    .src_clk(clk_voter), .src_rst(rst_voter), .src_pulse(upd_done_v),
    .dst_clk(clk_ctrl), .dst_rst(rst_ctrl), .dst_pulse(upd_ack_c)
  );

  // ------------------------------------------------------------------
  // control FPGA
  // ------------------------------------------------------------------
  logic        t_valid;
  logic [3:0]  t_id;
  logic        task_move, task_repair, task_inject, task_scrub, task_file;

  task_scheduler #(.CLK_HZ(SCHED_CLK_HZ)) u_sched (
    .clk(clk_ctrl), .rst(rst_ctrl),
    .cfg_we(sched_we), .cfg_slot(sched_slot), .cfg_period(sched_period), .cfg_enable(sched_enable),
    .out_valid(t_valid), .out_id(t_id), .out_ready(1'b1), .sec_tick(), .overruns(task_overruns)
  );

  always_comb begin
    task_move       = t_valid && (t_id == TASK_MOVE_TILE);
    task_repair     = t_valid && (t_id == TASK_REPAIR_TILE);
    task_power_meas = t_valid && (t_id == TASK_POWER_MEAS);
    task_power_logs = t_valid && (t_id == TASK_POWER_LOGS);
    task_active_upd = t_valid && (t_id == TASK_ACTIVE_UPD);
    task_file       = t_valid && (t_id == TASK_WRITE_FILE);
    task_watchdog   = t_valid && (t_id == TASK_WATCHDOG);
    task_inject     = t_valid && (t_id == TASK_FAULT_INJECT);
    task_scrub      = t_valid && (t_id == TASK_BLIND_SCRUB);
  end

  logic        c_req, c_prog, c_busy, c_done;
  bs_kind_t    c_kind;
  tile_idx_t   c_tile;
  logic        sd_ready, sd_rd_req, sd_valid, sd_rd_done, sd_rd_err;
  logic [31:0] sd_rd_block;
  logic [7:0]  sd_data;
  logic [N_TILES-1:0] active_c;

  tile_manager #(.HOLDOFF(HOLDOFF)) u_mgr (
    .clk(clk_ctrl), .rst(rst_ctrl),
    .health(health_t'(health_c)), .upd_ack(upd_ack_c),
    .upd_valid(upd_valid_c), .upd_triad(upd_triad_c), .upd_sync(upd_sync_c),
    .scrub_fault(scrub_fault), .scrub_tile(scrub_tile),
    .task_move(task_move), .task_repair(task_repair), .task_inject(task_inject),
    .task_scrub(task_scrub), .inject_bad(inject_bad),
    .cfg_req(c_req), .cfg_kind(c_kind), .cfg_tile(c_tile), .cfg_program(c_prog),
    .cfg_busy(c_busy), .cfg_done(c_done), .cfg_err(cfg_err),
    .ready(ready), .init_failed(init_failed), .triad(triad), .next_spare(next_spare),
    .spare_avail(), .faulted(faulted), .active(active_c),
    .total_faults(total_faults), .injected_faults(injected_faults), .tile_faults(tile_faults),
    .repair_busy()
  );

  selectmap_cfg u_cfg (
    .clk(clk_ctrl), .rst(rst_ctrl),
    .req(c_req), .req_kind(c_kind), .req_tile(c_tile), .req_program(c_prog),
    .busy(c_busy), .done(c_done), .err(cfg_err), .done_seen(),
    .sd_ready(sd_ready), .sd_rd_req(sd_rd_req), .sd_rd_block(sd_rd_block),
    .sd_valid(sd_valid), .sd_data(sd_data), .sd_rd_done(sd_rd_done), .sd_rd_err(sd_rd_err),
    .smap_program_b(smap_program_b), .smap_init_b(smap_init_b), .smap_csi_b(smap_csi_b),
    .smap_rdwr_b(smap_rdwr_b), .smap_cclk(smap_cclk), .smap_d(smap_d), .smap_done(smap_done)
  );

  sd_spi_reader #(.SLOW_HALF(SD_SLOW_HALF), .FAST_HALF(SD_FAST_HALF)) u_sd (
    .clk(clk_ctrl), .rst(rst_ctrl), .ready(sd_ready), .init_err(sd_init_err),
    .rd_req(sd_rd_req), .rd_block(sd_rd_block), .out_valid(sd_valid), .out_data(sd_data),
    .rd_done(sd_rd_done), .rd_err(sd_rd_err),
    .sd_cs_n(cfg_sd_cs_n), .sd_sck(cfg_sd_sck), .sd_mosi(cfg_sd_mosi), .sd_miso(cfg_sd_miso)
  );

  temp_sensor_reader #(.PERIOD(TEMP_PERIOD)) u_temp (
    .clk(clk_ctrl), .rst(rst_ctrl), .cs_n(temp_cs_n), .sck(temp_sck), .so(temp_so),
    .temp(die_temp), .valid(die_temp_valid)
  );

  sd_mode_ctrl #(.OFF_CYCLES(MODE_DELAY), .ON_CYCLES(MODE_DELAY)) u_mode (
    .clk(clk_ctrl), .rst(rst_ctrl), .write_req(task_file), .write_done(data_write_done),
    .pass_thru(data_pass_thru), .sd_pwr_en(data_sd_pwr_en), .grant(data_write_grant), .busy()
  );

  // the manager's active set always matches its triad
  a_triad_active: assert property (@(posedge clk_ctrl) disable iff (rst_ctrl)
    active_c[triad[0]] && active_c[triad[1]] && active_c[triad[2]]);

endmodule
