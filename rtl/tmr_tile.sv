// tmr_tile: one of the nine redundant tiles of the Artix-7 fabric.
//
// In the flight design a tile holds a MicroBlaze soft processor whose program
// counts from 0 to 16383 on a 14-bit output and then rolls over. This module
// implements that program's observable behaviour directly as a 14-bit counter,
// so the tile can be simulated and voted without the processor.
//
// Interface: the clock and two resets (auxiliary and external), as in the
// flight tile, plus tick, a one-cycle enable at the tile rate (the 156 kHz tile
// clock expressed as an enable in the 10 MHz domain). The load/load_value pair
// is this design's choice: it is how a spare is synchronised with the triad
// before it joins it. On a tick with load set the tile continues from
// load_value + 1, the same value the other tiles reach on that tick.
// Timing: the output changes one clock after each tick. Either reset, held
// for at least one clock, returns the count to zero (the effect of a partial
// reconfiguration of the tile).
module tmr_tile
  import artemis_pkg::*;
(
  input  logic       clk,
  input  logic       aux_rst,     // auxiliary reset, active high
  input  logic       ext_rst,     // external reset, active high
  input  logic       tick,        // tile-rate enable
  input  logic       load,        // synchronise to load_value on this tick
  input  tile_word_t load_value,
  output tile_word_t count
);

  always_ff @(posedge clk) begin
    if (aux_rst || ext_rst)
      count <= '0;
    else if (tick)
      count <= (load ? load_value : count) + 1'b1;
  end

endmodule
