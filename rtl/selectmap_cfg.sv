// selectmap_cfg: Artix-7 configuration state machine of the control FPGA.
//
// It copies a bitstream from the configuration SD card into the Artix-7
// through its 8-bit slave SelectMAP port. Three uses share it:
//  * initial configuration: req_program = 1, PROGRAM_B is pulsed low for
//    PROG_CYCLES clocks, INIT_B must return high, then the full bitstream is
//    written and DONE must go high within DONE_TIMEOUT clocks;
//  * blind scrub: the full bitstream is written again with req_program = 0,
//    rewriting the configuration memory of the running device;
//  * partial reconfiguration of one tile (repair or fault injection), with the
//    clean or the corrupted partial bitstream of that tile.
// The bitstream is located with bitstream_table (start address and length).
// The engine asks sd_spi_reader for one 512-byte block at a time, starting
// at block start >> 9, and passes exactly length bytes on; the rest of the
// last block is dropped. Each byte is placed on smap_d with CSI_B and RDWR_B
// low and clocked by one CCLK pulse (low one clock, high one clock). Bytes are
// sent without bit swapping, taken as already in the order the port expects.
// Timing: done (or err) pulses one clock at the end; busy is high throughout.
// The transfer method, PROGRAM_B/INIT_B/DONE handling and the timeouts are
// the usual slave SelectMAP procedure; the document gives only the function.
module selectmap_cfg
  import artemis_pkg::*;
#(
  parameter int unsigned PROG_CYCLES  = 20,        // 1 us at 20 MHz
  parameter int unsigned INIT_TIMEOUT = 2000000,   // 100 ms at 20 MHz
  parameter int unsigned DONE_TIMEOUT = 2000000
) (
  input  logic        clk,
  input  logic        rst,
  // request
  input  logic        req,
  input  bs_kind_t    req_kind,
  input  tile_idx_t   req_tile,
  input  logic        req_program,
  output logic        busy,
  output logic        done,
  output logic        err,
  output logic        done_seen,   // DONE was high at the end of the last load
  // SD card reader
  input  logic        sd_ready,
  output logic        sd_rd_req,
  output logic [31:0] sd_rd_block,
  input  logic        sd_valid,
  input  logic [7:0]  sd_data,
  input  logic        sd_rd_done,
  input  logic        sd_rd_err,
  // SelectMAP port of the Artix-7
  output logic        smap_program_b,
  input  logic        smap_init_b,
  output logic        smap_csi_b,
  output logic        smap_rdwr_b,
  output logic        smap_cclk,
  output logic [7:0]  smap_d,
  input  logic        smap_done
);

  typedef enum logic [2:0] { C_IDLE, C_PROG, C_INIT, C_BLOCK, C_WAIT, C_DONE } cstate_t;

  cstate_t     st;
  bs_kind_t    kind;
  tile_idx_t   tile;
  logic        prog_full;
  logic [31:0] tstart, tlen;
  logic        tvalid;
  logic [31:0] remain;
  logic [31:0] blk;
  logic [31:0] tmo;
  logic        pulse;      // CCLK high phase pending

  bitstream_table u_tab (.kind(kind), .tile(tile), .start_addr(tstart), .length(tlen), .valid(tvalid));

  assign busy        = (st != C_IDLE);
  assign smap_rdwr_b = 1'b0;       // write only

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; kind <= BS_FULL_GOOD; tile <= '0; prog_full <= 1'b0;
      remain <= '0; blk <= '0; tmo <= '0; pulse <= 1'b0;
      done <= 1'b0; err <= 1'b0; done_seen <= 1'b0;
      sd_rd_req <= 1'b0; sd_rd_block <= '0;
      smap_program_b <= 1'b1; smap_csi_b <= 1'b1; smap_cclk <= 1'b0; smap_d <= '0;
    end else begin
      done <= 1'b0; err <= 1'b0; sd_rd_req <= 1'b0;
      // CCLK: a byte placed on the bus is clocked on the next clock
      if (pulse) begin smap_cclk <= 1'b1; pulse <= 1'b0; end
      else smap_cclk <= 1'b0;

      case (st)
        C_IDLE: begin
          smap_csi_b <= 1'b1;
          if (req) begin
            kind <= req_kind; tile <= req_tile; prog_full <= req_program;
            st <= C_PROG; tmo <= '0;
          end
        end
        C_PROG: begin                          // table lookup settles here
          if (!tvalid) begin err <= 1'b1; st <= C_IDLE; end
          else begin
            remain <= tlen; blk <= tstart >> 9;
            if (prog_full) begin
              smap_program_b <= 1'b0;
              if (tmo == 32'(PROG_CYCLES)) begin
                smap_program_b <= 1'b1; tmo <= '0; st <= C_INIT;
              end else tmo <= tmo + 32'd1;
            end else st <= C_INIT;
          end
        end
        C_INIT: begin                          // INIT_B high and card ready
          if (smap_init_b && sd_ready) begin
            sd_rd_req <= 1'b1; sd_rd_block <= blk; smap_csi_b <= 1'b0;
            tmo <= '0; st <= C_BLOCK;
          end else if (tmo == 32'(INIT_TIMEOUT)) begin
            err <= 1'b1; st <= C_IDLE;
          end else tmo <= tmo + 32'd1;
        end
        C_BLOCK: begin
          if (sd_valid && remain != 0) begin
            smap_d <= sd_data; pulse <= 1'b1; remain <= remain - 32'd1;
          end
          if (sd_rd_err) begin
            err <= 1'b1; st <= C_IDLE;
          end else if (sd_rd_done) begin
            if (remain == 0) begin tmo <= '0; st <= C_WAIT; end
            else begin blk <= blk + 32'd1; st <= C_INIT; end
          end
        end
        C_WAIT: begin                          // DONE check
          smap_csi_b <= 1'b1;
          if (kind != BS_FULL_GOOD || smap_done) begin
            done_seen <= smap_done; st <= C_DONE;
          end else if (tmo == 32'(DONE_TIMEOUT)) begin
            done_seen <= 1'b0; err <= 1'b1; st <= C_IDLE;
          end else tmo <= tmo + 32'd1;
        end
        default: begin                         // C_DONE
          done <= 1'b1; st <= C_IDLE;
        end
      endcase
    end
  end

endmodule
