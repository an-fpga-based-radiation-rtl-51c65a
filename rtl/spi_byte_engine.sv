// spi_byte_engine: SPI master shifting one byte in each direction (mode 0).
//
// On start the engine sends tx MSB first on mosi and collects miso into rx.
// SCK idles low; mosi changes while SCK is low and miso is sampled on the
// rising edge. Each SCK half period lasts half_cycles clocks (at least 1), so
// the bit rate can be changed between bytes (slow during SD card
// initialisation, fast afterwards). done pulses for one clock with rx valid;
// a byte takes 16 * half_cycles clocks.
module spi_byte_engine (
  input  logic        clk,
  input  logic        rst,
  input  logic [7:0]  half_cycles,
  input  logic        start,
  input  logic [7:0]  tx,
  output logic        busy,
  output logic        done,
  output logic [7:0]  rx,
  output logic        sck,
  output logic        mosi,
  input  logic        miso
);

  logic [7:0] sh_tx;
  logic [2:0] bitn;
  logic [7:0] hcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      rx    <= '0;
      sck   <= 1'b0;
      mosi  <= 1'b1;
      sh_tx <= '1;
      bitn  <= '0;
      hcnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          sh_tx <= {tx[6:0], 1'b1};
          mosi  <= tx[7];
          bitn  <= 3'd7;
          hcnt  <= '0;
          sck   <= 1'b0;
        end
      end else if (hcnt + 8'd1 < half_cycles) begin
        hcnt <= hcnt + 8'd1;
      end else begin
        hcnt <= '0;
        if (!sck) begin
          sck <= 1'b1;                       // rising edge: sample
          rx  <= {rx[6:0], miso};
        end else begin
          sck <= 1'b0;                       // falling edge: next bit
          if (bitn == 3'd0) begin
            busy <= 1'b0;
            done <= 1'b1;
            mosi <= 1'b1;
          end else begin
            bitn  <= bitn - 3'd1;
            mosi  <= sh_tx[7];
            sh_tx <= {sh_tx[6:0], 1'b1};
          end
        end
      end
    end
  end

endmodule
