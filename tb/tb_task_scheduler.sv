// tb_task_scheduler: one "second" is 20 clocks here. Over 60 seconds with the
// default table the 1 s tasks must run 60 times and the 5 s task 12 times,
// the long tasks never; a slot reprogrammed to 3 s must run every 3 s; tasks
// due in the same second must leave the queue in slot order; a task left
// waiting while it falls due again must count an overrun.
module tb_task_scheduler;
  logic clk = 0, rst;
  logic cfg_we, cfg_enable;
  logic [3:0] cfg_slot;
  logic [19:0] cfg_period;
  logic out_valid, out_ready, sec_tick;
  logic [3:0] out_id;
  logic [15:0] overruns;
  int checks = 0, failures = 0;
  int runs[16];
  int secs = 0;
  int order[$];

  task_scheduler #(.CLK_HZ(20)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (sec_tick) secs++;
    if (out_valid && out_ready) begin runs[out_id]++; order.push_back(int'(out_id)); end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t0;
    rst = 1; cfg_we = 0; cfg_enable = 0; cfg_slot = 0; cfg_period = 0; out_ready = 1;
    repeat (2) @(posedge clk); #1 rst = 0;
    t0 = $time;
    wait (secs == 60); repeat (10) @(posedge clk);
    chk(runs[0] == 60 && runs[1] == 60, "1 s tasks");
    chk(runs[4] == 12, "5 s task");
    chk(runs[2] == 0 && runs[5] == 0 && runs[7] == 0 && runs[8] == 0, "long tasks idle");
    chk(runs[9] == 0 && runs[15] == 0, "empty slots idle");
    // same-second tasks leave in slot order: 0, 1, then 4 every fifth second
    chk(order[0] == 0 && order[1] == 1 && order[8] == 0 && order[9] == 1 && order[10] == 4, "FIFO order");
    // fault injection (slot 7) reprogrammed to 3 s
    @(posedge clk); #1 cfg_we = 1; cfg_slot = 4'd7; cfg_period = 20'd3; cfg_enable = 1;
    @(posedge clk); #1 cfg_we = 0;
    secs = 0; runs[7] = 0;
    wait (secs == 30); repeat (10) @(posedge clk);
    chk(runs[7] == 10, "reprogrammed 3 s task");
    // disable slot 0
    @(posedge clk); #1 cfg_we = 1; cfg_slot = 4'd0; cfg_period = 20'd1; cfg_enable = 0;
    @(posedge clk); #1 cfg_we = 0;
    runs[0] = 0; secs = 0;
    wait (secs == 5); repeat (10) @(posedge clk);
    chk(runs[0] == 0 && runs[1] >= 5, "disabled slot");
    // stall the consumer: slot 1 falls due again while queued
    out_ready = 0;
    secs = 0; wait (secs == 3); #1;
    chk(overruns >= 2, "overrun counted");
    out_ready = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
