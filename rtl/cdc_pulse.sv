// cdc_pulse: carries a one-clock pulse from one clock domain to another.
// The source flips a toggle on each pulse; the destination synchronises the
// toggle with two flip-flops and emits a one-clock pulse on each change.
// Pulses must be spaced by at least three destination clocks.
module cdc_pulse (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);
  logic tog, s1, s2, s3;
  always_ff @(posedge src_clk) begin
    if (src_rst) tog <= 1'b0;
    else if (src_pulse) tog <= ~tog;
  end
  always_ff @(posedge dst_clk) begin
    if (dst_rst) begin s1 <= 1'b0; s2 <= 1'b0; s3 <= 1'b0; end
    else begin s1 <= tog; s2 <= s1; s3 <= s2; end
  end
  assign dst_pulse = s2 ^ s3;
endmodule
