// tile_mux: picks the outputs of the three active tiles out of nine.
//
// The control FPGA names the active triad (a physical tile number 0..8 for each
// of the three slots). The multiplexer passes those three tile outputs on to
// the voter and to the control FPGA. A new triad arrives with upd_valid (one
// clock). It is held pending and applied on the next tile tick; on that same
// tick load[] is raised for the tiles named in upd_sync, so a spare joining
// the triad starts the tick at the voted value, and upd_done pulses one clock
// later. Applying the change on a tick edge, and the synchronisation itself,
// are this design's choices: the text only says the new tile is synced with
// the other two before TMR operation resumes.
// After reset the triad is tiles 0, 1 and 2, the first three tiles as on the
// status screen in normal operation.
module tile_mux
  import artemis_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      tick,
  input  tile_word_t [N_TILES-1:0]  tile_out,
  input  logic                      upd_valid,
  input  triad_t                    upd_triad,
  input  logic [N_TILES-1:0]        upd_sync,
  output logic                      upd_done,
  output triad_t                    triad,      // triad in force
  output logic [N_TILES-1:0]        load,       // to the tiles, valid with tick
  output tile_word_t [N_ACTIVE-1:0] active_out
);

  logic               pend;
  triad_t             pend_triad;
  logic [N_TILES-1:0] pend_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      pend       <= 1'b0;
      pend_triad <= '0;
      pend_sync  <= '0;
      triad      <= {4'd2, 4'd1, 4'd0};
      upd_done   <= 1'b0;
    end else begin
      upd_done <= 1'b0;
      if (upd_valid) begin
        pend       <= 1'b1;
        pend_triad <= upd_triad;
        pend_sync  <= upd_sync;
      end else if (pend && tick) begin
        pend     <= 1'b0;
        triad    <= pend_triad;
        upd_done <= 1'b1;
      end
    end
  end

  assign load = (pend && tick && !upd_valid) ? pend_sync : '0;

  always_comb begin
    for (int s = 0; s < N_ACTIVE; s++) begin
      active_out[s] = '0;
      for (int t = 0; t < N_TILES; t++)
        if (triad[s] == tile_idx_t'(t)) active_out[s] = tile_out[t];
    end
  end

endmodule
