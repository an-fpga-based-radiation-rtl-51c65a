// tile_manager: keeps three healthy tiles in the active triad.
//
// Every tile is in one of three states: active (in the triad), spare, or
// faulted (waiting for, or undergoing, repair). The manager
//  * configures the Artix-7 once after reset (full bitstream, PROGRAM_B
//    pulsed) and then starts with tiles 0, 1 and 2 active;
//  * on a voter fault report (Health_Tile 0..2) marks the tile in that slot
//    faulted and at once puts the next spare in its slot. The new triad goes
//    to the multiplexer with that spare flagged for synchronisation, and the
//    manager waits for the multiplexer's acknowledge plus HOLDOFF clocks
//    before it trusts Health_Tile again. Spares are taken round robin: the
//    search starts after the last tile brought in, which gives "next spare 3"
//    for the triad 0-1-2 and "next spare 0" for the triad 6-7-8;
//  * on a configuration-scrubber report for a tile does the same for an active
//    tile, and simply marks a spare faulted;
//  * on each Repair Tile task starts a partial reconfiguration of the lowest
//    numbered faulted tile with its clean bitstream; when it completes the
//    tile becomes a spare (a failed load leaves it faulted);
//  * on each Move Tile task retries a replacement that found no spare;
//  * on a Fault Injection task reconfigures one active tile (slots in turn),
//    with its clean or corrupted bitstream as inject_bad selects; the voter
//    then sees that tile restart from zero and the usual move and repair follow;
//  * on a Blind Scrub task rewrites the full bitstream without PROGRAM_B.
// Tasks that arrive while the configuration port is busy are kept and run
// when it is free. It counts faults per tile, all faults and injected faults.
// In the flight system this is done by the control software; here it is
// logic. The immediate move follows the text ("immediately brings up a new
// tile"); gating repairs by the 1 s Repair Tile task follows the task table.
// health must already be in this clock domain; it is used only when two
// successive samples agree, which filters a multi-bit synchroniser glitch.
module tile_manager
  import artemis_pkg::*;
#(
  parameter int unsigned HOLDOFF = 16
) (
  input  logic                clk,
  input  logic                rst,
  // voter and multiplexer (already synchronised)
  input  health_t             health,
  input  logic                upd_ack,       // multiplexer applied the triad
  output logic                upd_valid,     // pulse: new triad
  output triad_t              upd_triad,
  output logic [N_TILES-1:0]  upd_sync,
  // configuration scrubber report
  input  logic                scrub_fault,
  input  tile_idx_t           scrub_tile,
  // scheduled tasks (one-clock pulses)
  input  logic                task_move,
  input  logic                task_repair,
  input  logic                task_inject,
  input  logic                task_scrub,
  input  logic                inject_bad,
  // configuration engine
  output logic                cfg_req,
  output bs_kind_t            cfg_kind,
  output tile_idx_t           cfg_tile,
  output logic                cfg_program,
  input  logic                cfg_busy,
  input  logic                cfg_done,
  input  logic                cfg_err,
  // status
  output logic                ready,         // initial configuration done
  output logic                init_failed,
  output triad_t              triad,
  output tile_idx_t           next_spare,
  output logic                spare_avail,
  output logic [N_TILES-1:0]  faulted,
  output logic [N_TILES-1:0]  active,
  output logic [15:0]         total_faults,
  output logic [15:0]         injected_faults,
  output logic [N_TILES-1:0][15:0] tile_faults,
  output logic                repair_busy
);

  typedef enum logic [1:0] { T_SPARE, T_ACTIVE, T_FAULTED } tstate_t;
  typedef enum logic [2:0] { M_INIT, M_INIT_WAIT, M_RUN, M_ACK, M_HOLD } mstate_t;
  typedef enum logic [1:0] { J_NONE, J_REPAIR, J_INJECT, J_SCRUB } job_t;

  tstate_t [N_TILES-1:0] ts;
  mstate_t     ms;
  job_t        job;
  tile_idx_t   job_tile;
  tile_idx_t   ptr;             // where the spare search starts
  health_t     h_prev;
  logic [7:0]  hold;
  logic [N_ACTIVE-1:0] move_pend;   // slots whose tile is faulted, no spare yet
  logic        pend_repair, pend_inject, pend_scrub;
  logic [1:0]  inj_slot;
  logic        inj_bad_q;

  // ---- round-robin spare search ----
  always_comb begin
    next_spare  = ptr;
    spare_avail = 1'b0;
    for (int k = N_TILES - 1; k >= 0; k--) begin
      int unsigned t;
      t = (int'(ptr) + k) % N_TILES;
      if (ts[t] == T_SPARE) begin
        next_spare  = tile_idx_t'(t);
        spare_avail = 1'b1;
      end
    end
  end

  // lowest-numbered faulted tile that has left the triad
  logic      any_faulted;
  tile_idx_t first_faulted;
  always_comb begin
    any_faulted   = 1'b0;
    first_faulted = '0;
    for (int t = N_TILES - 1; t >= 0; t--)
      if (ts[t] == T_FAULTED && triad[0] != tile_idx_t'(t) && triad[1] != tile_idx_t'(t) &&
          triad[2] != tile_idx_t'(t)) begin
        any_faulted   = 1'b1;
        first_faulted = tile_idx_t'(t);
      end
  end

  always_comb begin
    for (int t = 0; t < N_TILES; t++) begin
      faulted[t] = (ts[t] == T_FAULTED);
      active[t]  = (ts[t] == T_ACTIVE);
    end
  end

  assign repair_busy = (job == J_REPAIR);

  // slot of an active tile in the triad
  function automatic logic [1:0] slot_of(triad_t tr, tile_idx_t t);
    for (int s = 0; s < N_ACTIVE; s++) if (tr[s] == t) return 2'(s);
    return 2'd0;
  endfunction

  logic       h_fault;
  logic [1:0] h_slot;
  assign h_fault = (health != HEALTH_OK) && (health == h_prev);
  assign h_slot  = health;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int t = 0; t < N_TILES; t++) begin
        ts[t] <= (t < N_ACTIVE) ? T_ACTIVE : T_SPARE;
        tile_faults[t] <= '0;
      end
      ms <= M_INIT; job <= J_NONE; job_tile <= '0; ptr <= tile_idx_t'(N_ACTIVE);
      h_prev <= HEALTH_OK; hold <= '0; move_pend <= '0;
      pend_repair <= 1'b0; pend_inject <= 1'b0; pend_scrub <= 1'b0;
      inj_slot <= '0; inj_bad_q <= 1'b0;
      triad <= {4'd2, 4'd1, 4'd0};
      upd_valid <= 1'b0; upd_triad <= {4'd2, 4'd1, 4'd0}; upd_sync <= '0;
      cfg_req <= 1'b0; cfg_kind <= BS_FULL_GOOD; cfg_tile <= '0; cfg_program <= 1'b0;
      ready <= 1'b0; init_failed <= 1'b0;
      total_faults <= '0; injected_faults <= '0;
    end else begin
      upd_valid <= 1'b0;
      cfg_req   <= 1'b0;
      h_prev    <= health;

      // task requests are remembered until served
      if (task_repair) pend_repair <= 1'b1;
      if (task_inject) begin pend_inject <= 1'b1; inj_bad_q <= inject_bad; end
      if (task_scrub)  pend_scrub  <= 1'b1;

      // configuration engine completion
      if (job != J_NONE && (cfg_done || cfg_err)) begin
        if (job == J_REPAIR && cfg_done) ts[job_tile] <= T_SPARE;
        job <= J_NONE;
      end

      case (ms)
        M_INIT: begin
          cfg_req <= 1'b1; cfg_kind <= BS_FULL_GOOD; cfg_program <= 1'b1;
          ms <= M_INIT_WAIT;
        end
        M_INIT_WAIT: begin
          if (cfg_done) begin
            ready <= 1'b1; ms <= M_HOLD; hold <= '0;
          end else if (cfg_err) begin
            init_failed <= 1'b1; ms <= M_INIT;   // try again
          end
        end
        M_RUN: begin
          logic       do_move;
          logic [1:0] mslot;
          logic [1:0] sslot;
          do_move = 1'b0;
          mslot   = '0;
          sslot   = slot_of(triad, scrub_tile);
          // 1) voter reports a faulted slot
          if (h_fault && h_slot != 2'd3 && !move_pend[h_slot]) begin
            ts[triad[h_slot]] <= T_FAULTED;
            tile_faults[triad[h_slot]] <= tile_faults[triad[h_slot]] + 16'd1;
            total_faults <= total_faults + 16'd1;
            do_move = 1'b1; mslot = h_slot;
          end
          // 2) scrubber report
          else if (scrub_fault && scrub_tile < tile_idx_t'(N_TILES) &&
                   ts[scrub_tile] != T_FAULTED) begin
            ts[scrub_tile] <= T_FAULTED;
            tile_faults[scrub_tile] <= tile_faults[scrub_tile] + 16'd1;
            total_faults <= total_faults + 16'd1;
            if (ts[scrub_tile] == T_ACTIVE) begin
              do_move = 1'b1; mslot = sslot;
            end
          end
          // 3) retry a pending replacement on the Move Tile task
          else if (task_move && move_pend != 0 && spare_avail) begin
            for (int s = N_ACTIVE - 1; s >= 0; s--) if (move_pend[s]) mslot = 2'(s);
            do_move = 1'b1;
          end

          if (do_move) begin
            if (spare_avail) begin
              triad[mslot]     <= next_spare;
              ts[next_spare]   <= T_ACTIVE;
              ptr              <= tile_idx_t'((int'(next_spare) + 1) % N_TILES);
              move_pend[mslot] <= 1'b0;
              upd_triad        <= triad;
              upd_triad[mslot] <= next_spare;
              upd_sync         <= N_TILES'(1) << next_spare;
              upd_valid        <= 1'b1;
              ms               <= M_ACK;
            end else begin
              move_pend[mslot] <= 1'b1;
            end
          end

          // configuration jobs, one at a time
          if (job == J_NONE && !cfg_busy && !cfg_req) begin
            if (pend_scrub) begin
              pend_scrub <= task_scrub;
              cfg_req <= 1'b1; cfg_kind <= BS_FULL_GOOD; cfg_program <= 1'b0;
              job <= J_SCRUB;
            end else if (pend_inject && move_pend == 0 && !do_move) begin
              pend_inject <= task_inject;
              cfg_req <= 1'b1; cfg_program <= 1'b0;
              cfg_kind <= inj_bad_q ? BS_PART_BAD : BS_PART_GOOD;
              cfg_tile <= triad[inj_slot];
              inj_slot <= (inj_slot == 2'd2) ? 2'd0 : inj_slot + 2'd1;
              injected_faults <= injected_faults + 16'd1;
              job <= J_INJECT;
            end else if (pend_repair && any_faulted && !(do_move && !spare_avail)) begin
              pend_repair <= task_repair;
              cfg_req <= 1'b1; cfg_program <= 1'b0;
              cfg_kind <= BS_PART_GOOD; cfg_tile <= first_faulted;
              job_tile <= first_faulted;
              job <= J_REPAIR;
            end else if (pend_repair && !any_faulted && move_pend == 0) begin
              pend_repair <= task_repair;
            end
          end
        end
        M_ACK: begin
          if (upd_ack) begin hold <= '0; ms <= M_HOLD; end
        end
        default: begin                          // M_HOLD
          if (hold == 8'(HOLDOFF)) ms <= M_RUN;
          else hold <= hold + 8'd1;
        end
      endcase
    end
  end

  // a job in flight while the port reports idle would be a protocol error
  a_cfg_one_at_a_time: assert property (@(posedge clk) disable iff (rst)
    cfg_req |-> !cfg_busy);

endmodule
