// tb_tile_mux: the three selected tile words must follow the triad for
// random tile outputs; a triad update must wait for the next tick, raise
// load for the flagged tiles on that tick only and acknowledge after it.
module tb_tile_mux;
  import artemis_pkg::*;
  logic clk = 0, rst, tick, upd_valid, upd_done;
  tile_word_t [N_TILES-1:0] tile_out;
  triad_t upd_triad, triad;
  logic [N_TILES-1:0] upd_sync, load;
  tile_word_t [N_ACTIVE-1:0] active_out;
  int checks = 0, failures = 0;

  tile_mux dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_sel(triad_t tr);
    for (int i = 0; i < 20; i++) begin
      foreach (tile_out[t]) tile_out[t] = tile_word_t'($urandom);
      #1;
      for (int s = 0; s < 3; s++) chk(active_out[s] == tile_out[tr[s]], "selection");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    triad_t nt;
    int seen_done;
    rst = 1; tick = 0; upd_valid = 0; upd_triad = '0; upd_sync = '0; tile_out = '0;
    @(posedge clk); #1 rst = 0;
    chk(triad == {4'd2, 4'd1, 4'd0}, "reset triad");
    check_sel(triad);
    for (int n = 0; n < 40; n++) begin
      nt[0] = tile_idx_t'($urandom_range(0, 8));
      nt[1] = tile_idx_t'($urandom_range(0, 8));
      nt[2] = tile_idx_t'($urandom_range(0, 8));
      upd_triad = nt; upd_sync = 9'(1 << $urandom_range(0, 8)); upd_valid = 1;
      @(posedge clk); #1 upd_valid = 0;
      // no tick yet: nothing changes
      repeat ($urandom_range(1, 5)) begin
        chk(load == 0 && !upd_done, "no load before tick");
        @(posedge clk); #1;
      end
      tick = 1; #1;
      chk(load == upd_sync, "load on tick");
      @(posedge clk); #1 tick = 0;
      chk(upd_done && triad == nt && load == 0, "applied");
      @(posedge clk); #1;
      chk(!upd_done, "done is one pulse");
      check_sel(nt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
