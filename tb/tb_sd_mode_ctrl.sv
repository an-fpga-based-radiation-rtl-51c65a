// tb_sd_mode_ctrl: a data-file write request must power the card off, switch
// to pass-thru, power it on and only then grant; write_done must power
// cycle back to card-reader mode. Delay lengths are checked in clocks.
module tb_sd_mode_ctrl;
  logic clk = 0, rst, write_req, write_done, pass_thru, sd_pwr_en, grant, busy;
  int checks = 0, failures = 0;
  int off_cnt = 0;

  sd_mode_ctrl #(.OFF_CYCLES(50), .ON_CYCLES(30)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && !sd_pwr_en) off_cnt++;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int c;
    rst = 1; write_req = 0; write_done = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    chk(!pass_thru && sd_pwr_en && !grant && !busy, "card reader after reset");
    for (int n = 0; n < 3; n++) begin
      off_cnt = 0;
      @(posedge clk); #1 write_req = 1; @(posedge clk); #1 write_req = 0;
      chk(!sd_pwr_en && !pass_thru && busy, "power off first");
      c = 1;
      while (!grant) begin @(posedge clk); #1; c++; end
      chk(pass_thru && sd_pwr_en, "pass-thru powered");
      chk(c == 81 && off_cnt == 50, "grant delay");
      repeat (10) @(posedge clk); #1;
      chk(grant, "grant held");
      off_cnt = 0;
      write_done = 1; @(posedge clk); #1 write_done = 0;
      chk(!grant && !sd_pwr_en, "released, power off");
      while (busy) @(posedge clk); #1;
      chk(!pass_thru && sd_pwr_en && off_cnt == 50, "back to card reader");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
