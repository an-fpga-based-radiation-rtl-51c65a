// tb_selectmap_cfg: the configuration engine with the SD reader, the SD
// card model and a model of the experiment FPGA's configuration port.
// Loads the clean and the corrupted partial bitstream of tile 1, then the
// full bitstream with PROGRAM_B. The port model checks the marker, every byte
// and the byte count of each load; this bench checks done/err, the tile
// resets, the PROGRAM_B pulse width, DONE and the error for an invalid tile.
module tb_selectmap_cfg;
  import artemis_pkg::*;
  logic clk = 0, clk_v = 0, rst;
  logic req, req_program, busy, done, err, done_seen;
  bs_kind_t req_kind;
  tile_idx_t req_tile;
  logic sd_ready, sd_rd_req, sd_valid, sd_rd_done, sd_rd_err, init_err;
  logic [31:0] sd_rd_block;
  logic [7:0] sd_data;
  logic sd_cs_n, sd_sck, sd_mosi, sd_miso;
  logic smap_program_b, smap_init_b, smap_csi_b, smap_rdwr_b, smap_cclk, smap_done;
  logic [7:0] smap_d;
  logic design_rst;
  logic [8:0] tile_rst;
  int checks = 0, failures = 0;
  int prog_low = 0, rst_seen = 0;

  selectmap_cfg dut (.*);
  sd_spi_reader #(.SLOW_HALF(4)) rd (.clk, .rst, .ready(sd_ready), .init_err, .rd_req(sd_rd_req),
    .rd_block(sd_rd_block), .out_valid(sd_valid), .out_data(sd_data), .rd_done(sd_rd_done),
    .rd_err(sd_rd_err), .sd_cs_n, .sd_sck, .sd_mosi, .sd_miso);
  sd_card_model card (.cs_n(sd_cs_n), .sck(sd_sck), .mosi(sd_mosi), .miso(sd_miso));
  artix_cfg_model fpga (.clk_voter(clk_v), .program_b(smap_program_b), .init_b(smap_init_b),
    .csi_b(smap_csi_b), .rdwr_b(smap_rdwr_b), .cclk(smap_cclk), .d(smap_d), .done(smap_done),
    .design_rst, .tile_rst);

  always #25 clk = ~clk;     // 20 MHz
  always #50 clk_v = ~clk_v; // 10 MHz
  always @(posedge clk) if (!rst && !smap_program_b) prog_low++;
  always @(posedge clk_v) if (tile_rst[1]) rst_seen++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(bs_kind_t k, int t, bit p, output bit ok, output bit bad);
    @(posedge clk); #1 req = 1; req_kind = k; req_tile = tile_idx_t'(t); req_program = p;
    @(posedge clk); #1 req = 0;
    for (int c = 0; c < (p ? 220_000_000 : 15_000_000) && !done && !err; c++) @(posedge clk);
    ok = done; bad = err;
    #1;
  endtask

  initial begin
    repeat (280_000_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    bit ok, bad;
    rst = 1; req = 0; req_kind = BS_FULL_GOOD; req_tile = '0; req_program = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    wait (sd_ready);
    // clean partial bitstream of tile 1
    load(BS_PART_GOOD, 1, 0, ok, bad);
    chk(ok && !bad, "partial done");
    repeat (20) @(posedge clk_v);
    chk(fpga.loads_good == 1 && fpga.errors == 0, "partial content");
    chk(rst_seen > 0 && tile_rst == 0, "tile restarted");
    chk(prog_low == 0, "no PROGRAM_B for partial");
    // corrupted partial bitstream of tile 1: tile held in reset
    load(BS_PART_BAD, 1, 0, ok, bad);
    repeat (4) @(posedge clk_v);
    chk(ok && fpga.loads_bad == 1 && fpga.errors == 0 && tile_rst[1], "bad partial");
    // invalid tile number
    load(BS_PART_GOOD, 12, 0, ok, bad);
    chk(bad && !ok, "invalid entry rejected");
    // full configuration with PROGRAM_B
    load(BS_FULL_GOOD, 0, 1, ok, bad);
    chk(ok && !bad && done_seen && smap_done, "full done");
    chk(prog_low == 20, "PROGRAM_B pulse");
    chk(fpga.loads_full == 1 && fpga.errors == 0 && !design_rst, "full content");
    $display("sd reads %0d, port errors %0d", card.reads, fpga.errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
