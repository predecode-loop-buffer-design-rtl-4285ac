// Shared types and default sizes of the predecode loop buffer subsystem.
//
// The fetch mode (Direct, Storage, Fast Access) and the record a Branch
// Information Table (BIT) entry holds (Tag, Execute Counter, Frequent Flag,
// Pre-Frequent Flag) follow the design's description. All widths and table
// depths are this design's own choice: PC width 16, execute counter 4 bits,
// threshold 4, replace register 3 bits, 8 BIT entries and 32 loop-buffer
// entries of a 128-bit control word. The depths were picked so that the
// storage bit counts agree with the published cell areas (BIT about 160
// register bits, loop buffer about 4400).
package plb_pkg;

  localparam int unsigned PC_W        = 16;
  localparam int unsigned CTRL_W      = 128;
  localparam int unsigned EXEC_W      = 4;
  localparam int unsigned THRESHOLD   = 4;
  localparam int unsigned REPLACE_W   = 3;
  localparam int unsigned BIT_ENTRIES = 8;
  localparam int unsigned PLB_ENTRIES = 32;

  // Fetch mode held in the two mode registers: S-reg (store) and F-reg
  // (fast access). Direct Mode is both cleared.
  typedef enum logic [1:0] {
    MODE_DIRECT  = 2'b00,
    MODE_STORAGE = 2'b01,
    MODE_FAST    = 2'b10
  } mode_e;

  // BIT program-phase state: writing (no Frequent Flag set) or monitoring
  // (at least one Frequent Flag set).
  typedef enum logic {
    PHASE_WRITING    = 1'b0,
    PHASE_MONITORING = 1'b1
  } phase_e;

endpackage
