// max6627_model: behavioural MAX6627 temperature sensor for simulation only.
// While cs_n is low it shifts out a 16-bit word MSB first, bits 15..3 being
// temp_q4 (signed, 1/16 degree C), bits 2..0 zero; a new bit is presented
// after each falling edge of sck.
module max6627_model (
  input  logic               cs_n,
  input  logic               sck,
  output logic               so,
  input  logic signed [12:0] temp_q4
);
  logic [15:0] sh = '0;
  assign so = sh[15];
  always @(negedge cs_n) sh = {temp_q4, 3'b000};
  always @(negedge sck) if (!cs_n) sh = {sh[14:0], 1'b0};
endmodule
