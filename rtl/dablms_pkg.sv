// dablms_pkg: constants and types shared by the DA-BLMS adaptive filter.
//
// The default configuration is the one the filter is built for: filter
// length N = 16, block size L = 4, input/weight/error feedback width B' = 8
// bits and 16-bit accumulation (the MAC's 16-bit ripple carry adder).
// The step size mu is a 4-bit input; it is read as an unsigned fraction
// mu/16 (this interpretation is a choice of this design).
// One adaptation iteration runs through four 16-cycle phases (64 cycles):
// partial filter products, weight-increment products, weight update and
// weight truncation.
package dablms_pkg;

  localparam int unsigned N_TAPS    = 16; // filter length N
  localparam int unsigned L_BLK     = 4;  // block size L
  localparam int unsigned B_IN      = 8;  // sample / weight / fed-back error width B'
  localparam int unsigned W_ACC     = 16; // accumulator width (16-bit RCA)
  localparam int unsigned MU_W      = 4;  // width of the step size input mu[3:0]

  // Phases of one adaptation iteration.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0, // waiting for a new block
    PH_U     = 3'd1, // MAC -> u(i,j), partial filter products (CTR1 = 1)
    PH_V     = 3'd2, // MAC -> v(i,j), weight increment products (CTR1 = 0)
    PH_W     = 3'd3, // old weight + mu*v through the RCA, one weight per cycle
    PH_T     = 3'd4  // decision-device truncation of the new weights
  } phase_e;

endpackage
