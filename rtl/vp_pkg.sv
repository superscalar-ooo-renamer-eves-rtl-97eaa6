// vp_pkg: shared constants and types of the renamer and value-prediction core.
//
// The defaults below are the configuration every module takes when it is
// instantiated without a parameter list. The value-prediction constants
// (5-bit confidence, 4/2/2 denominators, 128-retire cooldown, 1/1024 SafeStride
// threshold, 1,000,000-retire halving period, 64 branch IDs) follow the design
// description; the widths and structure sizes are this design's own choice.
package vp_pkg;

  // Core sizes (chosen; 64 branch IDs match a 64-bit global branch mask).
  localparam int unsigned WIDTH     = 4;
  localparam int unsigned N_LOG     = 64;
  localparam int unsigned N_PHYS    = 320;
  localparam int unsigned AL_SIZE   = 256;
  localparam int unsigned N_BRANCH  = 64;
  localparam int unsigned XLEN      = 64;
  localparam int unsigned PC_BITS   = 64;

  // Value-prediction structures.
  localparam int unsigned SVP_ENTRIES = 256;
  localparam int unsigned VPQ_SIZE    = 256;
  localparam int unsigned CONF_BITS   = 5;

  // EVES confidence layer.
  localparam int unsigned DENOM_INTALU = 4;
  localparam int unsigned DENOM_FPALU  = 2;
  localparam int unsigned DENOM_LOAD   = 2;
  localparam int unsigned COOLDOWN     = 128;
  localparam int unsigned SS_MISS_BITS = 16;
  localparam int unsigned SS_SHIFT     = 10;
  localparam int unsigned SS_PERIOD    = 1000000;

  // Instruction type buckets for value prediction.
  typedef enum logic [1:0] {
    VT_INTALU = 2'd0,
    VT_FPALU  = 2'd1,
    VT_LOAD   = 2'd2,
    VT_NONE   = 2'd3
  } vtype_e;

endpackage
