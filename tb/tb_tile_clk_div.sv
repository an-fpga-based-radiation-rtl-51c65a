// tb_tile_clk_div: with the default divide-by-64 the tick must come every 64
// clocks (10 MHz to 156.25 kHz) and tile_clk must be high for 32 of them.
module tb_tile_clk_div;
  logic clk = 0, rst, tick, tile_clk;
  int checks = 0, failures = 0;
  tile_clk_div dut (.*);
  always #50 clk = ~clk;   // 10 MHz

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int last, ntick, high;
    rst = 1; repeat (2) @(posedge clk); #1 rst = 0;
    last = -1; ntick = 0; high = 0;
    for (int c = 0; c < 64 * 50; c++) begin
      @(posedge clk); #1;
      if (tile_clk) high++;
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (c - last != 64) begin failures++; $display("FAIL period %0d", c - last); end
        end
        last = c; ntick++;
      end
    end
    checks++; if (ntick != 50) begin failures++; $display("FAIL ticks %0d", ntick); end
    checks++; if (high != 32 * 50) begin failures++; $display("FAIL duty %0d", high); end
    // the tick rate in Hz from a 10 MHz clock
    checks++; if (10_000_000 / 64 != 156_250) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
