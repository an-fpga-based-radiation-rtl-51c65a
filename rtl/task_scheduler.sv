// task_scheduler: periodic task timer with first-in first-out dispatch.
//
// The control computer runs its housekeeping as up to 16 periodic tasks. Each
// slot holds a period in seconds and an enable. A prescaler makes a one-second
// tick from the clock (CLK_HZ cycles). On each tick every enabled slot counts
// up; when it has counted its period the slot becomes due and its number is
// queued. Due slots enter the queue one per clock, lowest number first, and
// leave it in arrival order on out_valid/out_ready. A slot that falls due
// again while it is still waiting is counted in overruns and not queued twice.
// After reset slots 0..8 hold the mission task table (move tile 1 s, repair
// tile 1 s, power measurement 20 min, power logs 20 min 5 s, active tiles
// update 5 s, data file 12 h, watchdog 30 min, fault injection 11 h, blind
// scrub 7 h), all enabled; slots 9..15 are empty and disabled. A slot can be
// rewritten at any time with cfg_we; its count restarts at zero.
// The slot table, periods and FIFO order follow the text; the hardware form
// (prescaler, queue of depth 16, overrun count) is this design's.
module task_scheduler
  import artemis_pkg::*;
#(
  parameter int unsigned CLK_HZ = 20_000_000   // clock cycles per second
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_slot,
  input  logic [19:0] cfg_period,     // seconds, 0 disables
  input  logic        cfg_enable,
  output logic        out_valid,
  output logic [3:0]  out_id,
  input  logic        out_ready,
  output logic        sec_tick,
  output logic [15:0] overruns
);

  localparam int unsigned NS = N_TASK_SLOTS;

  logic [NS-1:0][19:0] period, cnt;
  logic [NS-1:0]       en, due, queued;
  logic [31:0]         pre;

  // queue
  logic [NS-1:0][3:0]  q;
  logic [4:0]          q_cnt;
  logic [3:0]          q_rd, q_wr;

  function automatic logic [19:0] default_period(int unsigned s);
    case (s)
      0: return 20'd1;        // move tile
      1: return 20'd1;        // repair tile
      2: return 20'd1200;     // update power measurement
      3: return 20'd1205;     // update power logs
      4: return 20'd5;        // active tiles update
      5: return 20'd43200;    // write data file
      6: return 20'd1800;     // watchdog update
      7: return 20'd39600;    // fault injection
      8: return 20'd25200;    // blind scrubber
      default: return 20'd0;
    endcase
  endfunction

  // lowest due slot
  logic       pick_v;
  logic [3:0] pick;
  always_comb begin
    pick_v = 1'b0;
    pick   = '0;
    for (int s = NS - 1; s >= 0; s--)
      if (due[s]) begin pick_v = 1'b1; pick = 4'(s); end
  end

  logic push, pop;
  assign push      = pick_v && (q_cnt != 5'(NS));
  assign pop       = out_valid && out_ready;
  assign out_valid = (q_cnt != 0);
  assign out_id    = q[q_rd];
  assign sec_tick  = (pre == 32'(CLK_HZ - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      pre <= '0; q_cnt <= '0; q_rd <= '0; q_wr <= '0; overruns <= '0;
      for (int s = 0; s < NS; s++) begin
        period[s] <= default_period(s);
        en[s]     <= (default_period(s) != 0);
        cnt[s]    <= '0;
        due[s]    <= 1'b0;
        queued[s] <= 1'b0;
        q[s]      <= '0;
      end
    end else begin
      pre <= sec_tick ? '0 : pre + 32'd1;

      if (sec_tick) begin
        for (int s = 0; s < NS; s++) begin
          if (en[s] && period[s] != 0) begin
            if (cnt[s] + 20'd1 >= period[s]) begin
              cnt[s] <= '0;
              if (due[s] || queued[s]) overruns <= overruns + 16'd1;
              else due[s] <= 1'b1;
            end else cnt[s] <= cnt[s] + 20'd1;
          end
        end
      end

      if (push) begin
        due[pick]    <= 1'b0;
        queued[pick] <= 1'b1;
        q[q_wr]      <= pick;
        q_wr         <= q_wr + 4'd1;
      end
      if (pop) begin
        queued[out_id] <= 1'b0;
        q_rd           <= q_rd + 4'd1;
      end
      q_cnt <= q_cnt + 5'(push) - 5'(pop);

      if (cfg_we) begin
        period[cfg_slot] <= cfg_period;
        en[cfg_slot]     <= cfg_enable;
        cnt[cfg_slot]    <= '0;
      end
    end
  end

endmodule
