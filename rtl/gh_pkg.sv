// gh_pkg: default sizes shared by the geometric-hashing probe engine.
//
// The default sizes are those of the reference configuration: a model
// database of M = 1024 models with n = 16 feature points gives
// Mn(n-1)/2 = 122880 (model, basis) pairs, i.e. a bit-level hash table of
// 8K bins x 120K bits.  It is split over P = 30 processing elements, each
// reading N = 64 bits per access and time multiplexed T = 64 times
// (P * N * T = 122880).  A scene has S = 256 feature points.
// Coordinate and vote widths are this design's own choices.
package gh_pkg;

  localparam int unsigned DEF_P      = 30;    // processing elements
  localparam int unsigned DEF_N      = 64;    // FPGA-memory datapath width
  localparam int unsigned DEF_T      = 64;    // time-multiplexing factor
  localparam int unsigned DEF_S      = 256;   // scene feature points
  localparam int unsigned DEF_BIN_W  = 13;    // 8K hash bins
  localparam int unsigned DEF_XY_W   = 8;     // scene coordinate width
  localparam int unsigned DEF_UV_W   = 8;     // basis-relative coordinate width
  localparam int unsigned DEF_VOTE_W = 8;     // vote counter width (S-2 <= 255)
  localparam int unsigned DEF_MUX    = 8;     // 8-to-1 multiplexers in a PE
  localparam int unsigned DEF_ENTRY_W = 1;   // bits per UID in a hash bin

endpackage
