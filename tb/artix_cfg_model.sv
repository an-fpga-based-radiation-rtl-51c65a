// artix_cfg_model: behavioural model of the experiment FPGA's configuration
// logic, for simulation only.
//
// It watches the slave SelectMAP port. A PROGRAM_B pulse clears the device:
// INIT_B and DONE go low, and design_rst (the external reset of the fabric)
// is held until a full bitstream has been loaded, then DONE rises. Every
// load (CSI_B low until it returns high) is checked: the first byte names the
// bitstream (see artemis_tb_pkg), the number of bytes must equal its length
// and each later byte must equal the card content. A clean partial bitstream
// pulses the tile's reset for RST_CYCLES voter clocks (the tile restarts); a
// corrupted one holds the tile in reset until a clean one is loaded for it.
// A full load without PROGRAM_B (a scrub) leaves the running design alone.
module artix_cfg_model #(
  parameter int RST_CYCLES = 4
) (
  input  logic       clk_voter,
  input  logic       program_b,
  output logic       init_b,
  input  logic       csi_b,
  input  logic       rdwr_b,
  input  logic       cclk,
  input  logic [7:0] d,
  output logic       done,
  output logic       design_rst,
  output logic [8:0] tile_rst
);
  import artemis_tb_pkg::*;

  int          nbytes = 0;
  int          kind = -1, tile = 0;
  longint      start = 0;
  int          errors = 0;
  int          loads_full = 0, loads_scrub = 0, loads_good = 0, loads_bad = 0;
  bit          cleared = 0;
  logic [8:0]  broken = '0;
  int          pulse_cnt[9];
  int          last_kind = -1, last_tile = -1;

  initial begin
    init_b = 1'b1; done = 1'b0; design_rst = 1'b1; tile_rst = '0;
    foreach (pulse_cnt[i]) pulse_cnt[i] = 0;
  end

  always @(negedge program_b) begin
    init_b = 1'b0; done = 1'b0; design_rst = 1'b1; cleared = 1;
  end
  always @(posedge program_b) begin
    #200ns init_b = 1'b1;
  end

  always @(posedge cclk) begin
    if (!csi_b && !rdwr_b) begin
      if (nbytes == 0) begin
        if (d[7:6] != 2'b10) begin
          errors++; kind = -1;
        end else begin
          kind = int'(d[5:4]); tile = int'(d[3:0]);
          start = longint'(bs_start(kind, tile));
        end
      end else if (kind >= 0 && d != sd_byte(start + nbytes)) begin
        errors++;
      end
      nbytes++;
    end
  end

  always @(posedge csi_b) begin
    if (nbytes > 0) begin
      if (kind < 0 || nbytes != int'(bs_len(kind, tile))) errors++;
      last_kind = kind; last_tile = tile;
      if (kind == 0) begin
        if (cleared) begin
          loads_full++; cleared = 0; done = 1'b1;
          @(posedge clk_voter); design_rst = 1'b0;
        end else loads_scrub++;
      end else if (kind == 1) begin
        loads_good++;
        broken[tile] = 1'b0;
        pulse_cnt[tile] = RST_CYCLES;
      end else if (kind == 2) begin
        loads_bad++;
        broken[tile] = 1'b1;
      end
    end
    nbytes = 0;
  end

  always @(posedge clk_voter) begin
    for (int t = 0; t < 9; t++) begin
      tile_rst[t] <= broken[t] || (pulse_cnt[t] > 0);
      if (pulse_cnt[t] > 0) pulse_cnt[t]--;
    end
  end
endmodule
