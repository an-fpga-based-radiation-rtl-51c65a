// tmr_voter: majority voter over the three active tile outputs.
//
// It compares the three words pairwise. When all three agree Health_Tile is 3.
// When one word differs from the other two, Health_Tile gives its slot (0, 1
// or 2) so the control FPGA can find and replace that tile. voted is the
// bitwise majority of the three words. no_majority flags the case where all
// three differ, which a 2-bit Health_Tile cannot name; that flag, and
// registering the outputs once on the 10 MHz clock, are this design's choices.
// Timing: outputs are valid one clock after the inputs.
module tmr_voter
  import artemis_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst,
  input  tile_word_t [N_ACTIVE-1:0] in,
  output tile_word_t                voted,
  output health_t                   health_tile,
  output logic                      no_majority
);

  logic eq01, eq02, eq12;
  assign eq01 = (in[0] == in[1]);
  assign eq02 = (in[0] == in[2]);
  assign eq12 = (in[1] == in[2]);

  always_ff @(posedge clk) begin
    if (rst) begin
      voted       <= '0;
      health_tile <= HEALTH_OK;
      no_majority <= 1'b0;
    end else begin
      voted       <= (in[0] & in[1]) | (in[0] & in[2]) | (in[1] & in[2]);
      no_majority <= !eq01 && !eq02 && !eq12;
      if (eq01 && eq02)  health_tile <= HEALTH_OK;
      else if (eq01)     health_tile <= HEALTH_SLOT2;
      else if (eq02)     health_tile <= HEALTH_SLOT1;
      else if (eq12)     health_tile <= HEALTH_SLOT0;
      else               health_tile <= HEALTH_OK;
    end
  end

endmodule
