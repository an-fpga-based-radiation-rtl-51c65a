// artemis_pkg: types and constants shared by the TMR+Spares computer.
//
// Nine identical tiles each produce a 14-bit output. Three of them run as an
// active triad and the other six are spares. The voter reports which active
// slot disagrees on a 2-bit Health_Tile bus. The value 3 means all three agree,
// which is what the status screen prints as "Voter Output: 3" in normal running.
// The values 0 to 2 name the faulted slot; that use of 0..2 is this design's choice.
package artemis_pkg;

  localparam int unsigned N_TILES  = 9;   // tiles in the Artix-7 fabric
  localparam int unsigned N_ACTIVE = 3;   // tiles in the active triad
  localparam int unsigned TILE_W   = 14;  // width of a tile output

  typedef logic [3:0]        tile_idx_t;   // physical tile number 0..8
  typedef logic [TILE_W-1:0] tile_word_t;  // one tile output word
  typedef tile_idx_t [N_ACTIVE-1:0] triad_t; // physical tile in each active slot

  // Health_Tile encoding
  typedef enum logic [1:0] {
    HEALTH_SLOT0 = 2'd0,
    HEALTH_SLOT1 = 2'd1,
    HEALTH_SLOT2 = 2'd2,
    HEALTH_OK    = 2'd3
  } health_t;

  // Kind of bitstream fetched from the SD card
  typedef enum logic [1:0] {
    BS_FULL_GOOD = 2'd0,   // full configuration
    BS_PART_GOOD = 2'd1,   // clean partial bitstream of one tile
    BS_PART_BAD  = 2'd2    // corrupted partial bitstream of one tile
  } bs_kind_t;

  // Task numbers of the periodic scheduler, in the order of the mission task table
  typedef enum logic [3:0] {
    TASK_MOVE_TILE    = 4'd0,
    TASK_REPAIR_TILE  = 4'd1,
    TASK_POWER_MEAS   = 4'd2,
    TASK_POWER_LOGS   = 4'd3,
    TASK_ACTIVE_UPD   = 4'd4,
    TASK_WRITE_FILE   = 4'd5,
    TASK_WATCHDOG     = 4'd6,
    TASK_FAULT_INJECT = 4'd7,
    TASK_BLIND_SCRUB  = 4'd8
  } task_id_t;

  localparam int unsigned N_TASK_SLOTS = 16;

endpackage
