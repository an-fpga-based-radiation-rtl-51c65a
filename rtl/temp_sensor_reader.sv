// temp_sensor_reader: reads the Artix-7 die temperature from a MAX6627.
//
// The MAX6627 measures the die through the Artix-7's diode-connected
// transistor and is read over a three-wire SPI link (CS, SCK, SO). Every
// PERIOD clocks this block lowers cs_n, clocks in one 16-bit word MSB first
// (sampling so on each rising edge of sck, SCK half period SCK_HALF clocks),
// and raises cs_n. Bits 15..3 are the temperature as a signed 13-bit number
// in units of 1/16 degree Celsius; temp and valid (one clock) then update.
// The word format and the 2 MHz SCK default come from the sensor's data sheet;
// the read interval is this design's choice.
module temp_sensor_reader #(
  parameter int unsigned SCK_HALF = 5,          // 20 MHz / 10 = 2 MHz
  parameter int unsigned PERIOD   = 10_000_000  // one read every 0.5 s at 20 MHz
) (
  input  logic               clk,
  input  logic               rst,
  output logic               cs_n,
  output logic               sck,
  input  logic               so,
  output logic signed [12:0] temp,              // 1/16 degree C
  output logic               valid
);

  logic [31:0] wait_cnt;
  logic [7:0]  hcnt;
  logic [4:0]  nbit;
  logic [15:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_cnt <= '0; hcnt <= '0; nbit <= '0; sh <= '0;
      cs_n <= 1'b1; sck <= 1'b0; temp <= '0; valid <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (cs_n) begin
        if (wait_cnt == 32'(PERIOD - 1)) begin
          wait_cnt <= '0; cs_n <= 1'b0; nbit <= '0; hcnt <= '0; sck <= 1'b0;
        end else wait_cnt <= wait_cnt + 32'd1;
      end else if (hcnt + 8'd1 < 8'(SCK_HALF)) begin
        hcnt <= hcnt + 8'd1;
      end else begin
        hcnt <= '0;
        if (nbit == 5'd16) begin             // frame complete
          cs_n  <= 1'b1;
          temp  <= sh[15:3];
          valid <= 1'b1;
        end else if (!sck) begin
          sck <= 1'b1;
          sh  <= {sh[14:0], so};
        end else begin
          sck  <= 1'b0;
          nbit <= nbit + 5'd1;
        end
      end
    end
  end

endmodule
