// tile_clk_div: divider from the 10 MHz voter clock to the tile rate.
//
// The tiles run at about 156 kHz, derived from the 10 MHz voter and
// multiplexer clock. Dividing by 64 gives 156.25 kHz; the factor 64 is this
// design's reading of "156 kHz". Instead of a second clock net the divider
// produces tick, high for one 10 MHz cycle out of every DIV, which the tiles
// use as a clock enable. tile_clk is the equivalent square wave (high for the
// first half of each period) for observation or for an output pin.
// Timing: tick is high in the cycle where the internal count is DIV-1.
module tile_clk_div #(
  parameter int unsigned DIV = 64   // 10 MHz / 64 = 156.25 kHz
) (
  input  logic clk,
  input  logic rst,
  output logic tick,
  output logic tile_clk
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)
      cnt <= '0;
    else if (cnt == CW'(DIV - 1))
      cnt <= '0;
    else
      cnt <= cnt + 1'b1;
  end

  assign tick     = (cnt == CW'(DIV - 1));
  assign tile_clk = (cnt < CW'(DIV / 2));

endmodule
