// Shared types and constants of the kNN drone-authentication datapath.
//
// All arithmetic is IEEE-754 double precision (binary64), carried as raw
// 64-bit words.  The constants below are the bit patterns of the values the
// split function needs (1.0, 0.99 and 0.01 for the random range 0.01..1).
// split_mode_e selects the two variants of the split function: the
// registration authority (RA) copies the ID where S[k]=1, the drone copies it
// where S[k]=0.  The default sizes follow the main configuration evaluated:
// 128-element ID vectors (a 512-element encrypted index) and 200 drones.
package knn_pkg;

  typedef logic [63:0] fp64_t;

  localparam fp64_t FP64_ZERO     = 64'h0000_0000_0000_0000;
  localparam fp64_t FP64_ONE      = 64'h3FF0_0000_0000_0000;
  localparam fp64_t FP64_NEG_ONE  = 64'hBFF0_0000_0000_0000;
  localparam fp64_t FP64_0P99     = 64'h3FEF_AE14_7AE1_47AE; // 0.99
  localparam fp64_t FP64_0P01     = 64'h3F84_7AE1_47AE_147B; // 0.01

  // Number of sub-indices in an encrypted index: E = [I1, I2, I3, I4].
  localparam int unsigned NUM_SUB = 4;

  typedef enum logic {
    MODE_RA    = 1'b0,   // copy ID where S[k] == 1 (registration authority)
    MODE_DRONE = 1'b1    // copy ID where S[k] == 0 (drone request)
  } split_mode_e;

  localparam int unsigned DEF_N_ID       = 128;
  localparam int unsigned DEF_NUM_DRONES = 200;

endpackage
