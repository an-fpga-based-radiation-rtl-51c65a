// cdc_sync: two-flip-flop synchroniser for W independent or slowly changing bits.
// The output follows the input two destination clocks later. Multi-bit values
// may be seen mixed for one clock during a change; users filter for that.
module cdc_sync #(
  parameter int unsigned W = 1,
  parameter logic [W-1:0] RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;
  always_ff @(posedge clk) begin
    if (rst) begin meta <= RESET_VALUE; q <= RESET_VALUE; end
    else     begin meta <= d;           q <= meta;        end
  end
endmodule
