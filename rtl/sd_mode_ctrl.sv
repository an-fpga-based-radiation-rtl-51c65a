// sd_mode_ctrl: switches the data SD card between the USB reader and the FPGA.
//
// The data board's MAX14502 normally runs in card-reader mode, so the data
// card appears as a USB drive. To write a data file the control FPGA takes
// the card: it cuts the card's power for OFF_CYCLES, selects pass-thru mode,
// powers the card again, waits ON_CYCLES and raises grant. When the writer
// signals write_done the reverse happens: grant falls, the card is power
// cycled and card-reader mode is restored. The power cycle on every switch
// follows the text; the two delays are this design's (10 ms each at 20 MHz).
// Outputs: pass_thru (1 = FPGA owns the card), sd_pwr_en, grant, busy.
module sd_mode_ctrl #(
  parameter int unsigned OFF_CYCLES = 200_000,
  parameter int unsigned ON_CYCLES  = 200_000
) (
  input  logic clk,
  input  logic rst,
  input  logic write_req,    // pulse: a data file is to be written
  input  logic write_done,   // pulse: writing finished
  output logic pass_thru,
  output logic sd_pwr_en,
  output logic grant,
  output logic busy
);

  typedef enum logic [2:0] { M_READER, M_OFF_TO_PT, M_ON_PT, M_PASS, M_OFF_TO_RD, M_ON_RD } mode_t;
  mode_t       st;
  logic [31:0] cnt;

  assign grant = (st == M_PASS);
  assign busy  = (st != M_READER);

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= M_READER; cnt <= '0; pass_thru <= 1'b0; sd_pwr_en <= 1'b1;
    end else begin
      case (st)
        M_READER: if (write_req) begin st <= M_OFF_TO_PT; sd_pwr_en <= 1'b0; cnt <= '0; end
        M_OFF_TO_PT: begin
          if (cnt == 32'(OFF_CYCLES - 1)) begin
            pass_thru <= 1'b1; sd_pwr_en <= 1'b1; cnt <= '0; st <= M_ON_PT;
          end else cnt <= cnt + 32'd1;
        end
        M_ON_PT: begin
          if (cnt == 32'(ON_CYCLES - 1)) begin cnt <= '0; st <= M_PASS; end
          else cnt <= cnt + 32'd1;
        end
        M_PASS: if (write_done) begin st <= M_OFF_TO_RD; sd_pwr_en <= 1'b0; cnt <= '0; end
        M_OFF_TO_RD: begin
          if (cnt == 32'(OFF_CYCLES - 1)) begin
            pass_thru <= 1'b0; sd_pwr_en <= 1'b1; cnt <= '0; st <= M_ON_RD;
          end else cnt <= cnt + 32'd1;
        end
        default: begin                          // M_ON_RD
          if (cnt == 32'(ON_CYCLES - 1)) begin cnt <= '0; st <= M_READER; end
          else cnt <= cnt + 32'd1;
        end
      endcase
    end
  end

  // the card is never powered while the mode changes
  a_mode_change_unpowered: assert property (@(posedge clk) disable iff (rst)
    $changed(pass_thru) |-> !$past(sd_pwr_en));

endmodule
