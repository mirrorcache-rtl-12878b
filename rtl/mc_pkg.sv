// Shared constants and types of the mirror cache.
//
// The cache is a relaxed-retention STTRAM L1 data cache whose data store is split into
// two equal segments: the main segment and the auxiliary (mirror) segment. A block that
// has lived close to the retention time is refreshed by copying it into the other
// segment instead of into an external refresh buffer. The defaults below are the main
// configuration: 32 KB logical capacity, 64 B lines, 4 ways, 2 GHz core clock and the
// 100 us retention STTRAM, whose write takes 3 cycles and whose hit takes 1 cycle.
// The 32-bit address and 32-bit CPU word are choices of this design.
package mc_pkg;

  // Cache geometry.
  localparam int unsigned DEF_CACHE_BYTES = 32768;   // logical size (main segment)
  localparam int unsigned DEF_LINE_BYTES  = 64;
  localparam int unsigned DEF_WAYS        = 4;
  localparam int unsigned DEF_ADDR_W      = 32;
  localparam int unsigned DEF_WORD_W      = 32;

  // Timing of the 100 us retention STTRAM at 2 GHz.
  localparam int unsigned DEF_RETENTION_CYCLES = 200_000;  // 100 us * 2 GHz
  localparam int unsigned DEF_WRITE_LAT        = 3;        // cycles per segment write

  // Refresh counter: S states, P = S - 1, counter clock period C = R / P.
  localparam int unsigned CNT_STATES = 4;
  localparam int unsigned CNT_P      = CNT_STATES - 1;

  // Segment holding a block, as stored in the status array.
  typedef enum logic {
    SEG_MAIN = 1'b0,
    SEG_AUX  = 1'b1
  } seg_e;

  // States of the per-block refresh counter FSM.
  typedef enum logic [1:0] {
    CNT_S0 = 2'd0,
    CNT_S1 = 2'd1,
    CNT_S2 = 2'd2,
    CNT_S3 = 2'd3   // state P: the block must be refreshed
  } cnt_state_e;

  // States of the controller's CPU machine.
  typedef enum logic [3:0] {
    C_IDLE,       // waiting for a request; load hits are served from here
    C_RD_RESP,    // load hit data returned
    C_WR,         // store hit: write in place (main) or read the line (auxiliary)
    C_WR_MERGE,   // merge the store into the line read from the auxiliary segment
    C_WR_MAIN,    // write the merged line to the main segment
    C_MISS,       // victim chosen; read it if it is dirty
    C_WB_CAP,     // capture the victim line
    C_WB,         // write the victim back to the lower level
    C_FILL_REQ,   // request the missing line
    C_FILL_WAIT,  // wait for the line
    C_FILL_WR,    // write the line (merged with store data) to the main segment
    C_WAIT_W      // wait for the segment write to finish, then respond
  } cpu_state_e;

  // States of the controller's refresh engine.
  typedef enum logic [1:0] {
    R_IDLE,       // pick a block whose counter reached P and read it
    R_CAP,        // capture the line from the read/refresh mux
    R_WR,         // write it to the other segment
    R_WAIT        // wait for the write, then invert the status bit
  } ref_state_e;

endpackage
