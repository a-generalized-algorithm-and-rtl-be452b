// dct_pkg: types and width rules shared by the reconfigurable approximate DCT.
//
// The datapath is built from 8-point approximate DCT units. An N-point
// transform (N = 16, 32) is one N-point input butterfly followed by two
// N/2-point transforms and an even/odd output interleave. Each butterfly level
// adds one bit and the 8-point unit adds three, so an IW-bit sample gives
// IW + 3 + log2(N/8) bit coefficients; nothing is truncated.
//
// The operating mode of the 32-lane datapath is encoded here. The mode names
// follow the three configurations of the architecture (one 32-point, two
// 16-point or four 8-point transforms); the 2-bit encoding is this design's
// own choice.
package dct_pkg;

  typedef enum logic [1:0] {
    MODE_8X4  = 2'd0,   // four independent 8-point transforms
    MODE_16X2 = 2'd1,   // two independent 16-point transforms
    MODE_32   = 2'd2    // one 32-point transform (2'd3 is treated alike)
  } dct_mode_e;

  // Bits added by the multiplier-free 8-point unit: its largest row sums
  // eight samples.
  localparam int unsigned C8_GROWTH = 3;

  // Number of lanes of the full reconfigurable datapath.
  localparam int unsigned LANES = 32;

endpackage
