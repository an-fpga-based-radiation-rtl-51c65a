// tb_temp_sensor_reader: the sensor model serves a sequence of signed
// temperatures; each must come back unchanged, one read per PERIOD, with a
// 16-clock-edge frame and SCK at clk / (2*SCK_HALF).
module tb_temp_sensor_reader;
  logic clk = 0, rst, cs_n, sck, so, valid;
  logic signed [12:0] temp, temp_q4;
  int checks = 0, failures = 0;
  int edges = 0;

  temp_sensor_reader #(.SCK_HALF(5), .PERIOD(500)) dut (.*);
  max6627_model sensor (.cs_n, .sck, .so, .temp_q4);
  always #25 clk = ~clk;
  always @(posedge sck) if (!cs_n) edges++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int vals[6] = '{0, 16 * 45, -16 * 20, 1, -1, 4095};
    int tlast, tnow;
    rst = 1; temp_q4 = '0;
    repeat (2) @(posedge clk); #1 rst = 0;
    tlast = -1;
    foreach (vals[i]) begin
      temp_q4 = 13'(vals[i]);
      edges = 0;
      @(negedge cs_n);
      @(posedge valid); #1;
      tnow = $time / 50;
      checks++;
      if (temp != 13'(vals[i]) || edges != 16) begin
        failures++; $display("FAIL read %0d got %0d edges %0d", vals[i], temp, edges);
      end
      if (tlast >= 0) begin
        checks++;
        // PERIOD idle clocks + 16 bits * 2 * 5 + the final half period
        if (tnow - tlast != 500 + 165) begin failures++; $display("FAIL interval %0d", tnow - tlast); end
      end
      tlast = tnow;
    end
    $display("temperature %0d/16 C", temp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
