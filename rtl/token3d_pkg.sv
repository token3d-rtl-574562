// token3d_pkg: widths and constants shared by the Token3D power-control blocks.
//
// All power quantities are counted in power tokens.  One token is the energy
// of one instruction staying in the instruction window for one cycle (this is
// the unit the power-token scheme is built on).  Temperatures are unsigned
// fixed point in degrees Celsius with TEMP_FRAC fractional bits.  The token,
// power and temperature widths are this design's own choices; the table size,
// the window/epoch lengths, the 5 % bucket step and the core/layer counts are
// the values of the evaluated 4-layer, 16-core CMP.
package token3d_pkg;

  // CMP organisation (4-layer, 16-core configuration)
  localparam int unsigned NCORES_DEF   = 16;
  localparam int unsigned NLAYERS_DEF  = 4;

  // Core front end / back end widths (4 inst/cycle decode and issue)
  localparam int unsigned FETCH_W_DEF  = 4;
  localparam int unsigned COMMIT_W_DEF = 4;

  // Power Token History Table
  localparam int unsigned PTHT_ENTRIES_DEF = 8192;
  localparam int unsigned PC_W         = 32;
  localparam int unsigned STAMP_W      = 16;   // dispatch time stamp width

  // Token widths
  localparam int unsigned TOKEN_W      = 10;   // tokens of one instruction
  localparam int unsigned POW_W        = 14;   // tokens of one core in one cycle

  // Temperature: unsigned Q8.4 degrees Celsius
  localparam int unsigned TEMP_W       = 12;
  localparam int unsigned TEMP_FRAC    = 4;

  // Update intervals
  localparam int unsigned LEAK_WINDOW_DEF  = 10_000;   // leakage update window
  localparam int unsigned BUCKET_EPOCH_DEF = 100_000;  // Token3D re-bucketing period
  localparam int unsigned BUCKET_STEP_PCT_DEF = 5;     // bucket width in % of coolest core

  typedef logic [TOKEN_W-1:0] token_t;
  typedef logic [POW_W-1:0]   pow_t;
  typedef logic [TEMP_W-1:0]  temp_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [STAMP_W-1:0] stamp_t;

  // One committing instruction as seen by the PTHT
  typedef struct packed {
    logic   valid;
    pc_t    pc;
    token_t base_tokens;   // a-priori structure accesses of the instruction
    stamp_t dispatch_stamp; // cycle stamp taken when it entered the window
  } commit_t;

  // Saturating add of two unsigned values of width W (result width W)
  function automatic pow_t sat_add_pow(input pow_t a, input pow_t b);
    logic [POW_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[POW_W] ? '1 : s[POW_W-1:0];
  endfunction

endpackage
