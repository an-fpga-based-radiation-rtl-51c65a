// tb_tmr_tile: checks the tile counter: reset to zero, one step per tick,
// roll-over after 16383, synchronising load, and both resets.
module tb_tmr_tile;
  import artemis_pkg::*;
  logic clk = 0, aux_rst, ext_rst, tick, load;
  tile_word_t load_value, count;
  int checks = 0, failures = 0;
  int ref_cnt;

  tmr_tile dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: count=%0d ref=%0d", what, count, ref_cnt); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    aux_rst = 1; ext_rst = 0; tick = 0; load = 0; load_value = '0;
    @(posedge clk); #1 aux_rst = 0;
    chk(count == 0, "reset");
    ref_cnt = 0;
    // 20000 ticks, every third cycle, crosses the roll-over
    for (int i = 0; i < 60000; i++) begin
      tick = (i % 3 == 0);
      @(posedge clk); #1;
      if (tick) ref_cnt = (ref_cnt + 1) % 16384;
      if (i % 97 == 0) chk(count == tile_word_t'(ref_cnt), "count");
    end
    tick = 0;
    chk(count == tile_word_t'(ref_cnt), "after run");
    // load without tick does nothing
    load = 1; load_value = 14'd1234; @(posedge clk); #1;
    chk(count == tile_word_t'(ref_cnt), "load needs tick");
    tick = 1; @(posedge clk); #1; tick = 0; load = 0; ref_cnt = 1235;
    chk(count == 14'd1235, "load");
    load_value = 14'h3FFF; load = 1; tick = 1; @(posedge clk); #1; tick = 0; load = 0; ref_cnt = 0;
    chk(count == 14'd0, "load wrap");
    tick = 1; repeat (5) @(posedge clk); #1; tick = 0; ref_cnt = 5;
    chk(count == 14'd5, "count 5");
    ext_rst = 1; tick = 1; @(posedge clk); #1; ext_rst = 0; tick = 0; ref_cnt = 0;
    chk(count == 0, "ext reset");
    tick = 1; repeat (3) @(posedge clk); #1; tick = 0;
    aux_rst = 1; @(posedge clk); #1; aux_rst = 0;
    chk(count == 0, "aux reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
