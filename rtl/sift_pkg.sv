// sift_pkg: widths, types and Gaussian kernels shared by the SIFT detector.
//
// Pixels are 8-bit grey levels. Gaussian pixels are unsigned fixed point 8.10
// (8 integer, 10 fraction bits), because every kernel sums to 1024 = 2^10 and
// the divide by that sum is a right shift. DoG pixels are 9-bit signed whole
// grey levels. Coordinates are 16-bit.
//
// Kernels: six scales per octave, sigma_j = 1.6 * 2^(j/3), j = 0..5, sampled
// over 15 taps (offsets -7..+7). K_i is the weight at offset 7-i, so K7 is
// the centre tap and K0 the outermost pair, as in the row filter drawing:
//   K_i = round(1024 * exp(-(7-i)^2 / (2 sigma^2)) / sum_d exp(-d^2/(2 sigma^2)))
// with K7 then adjusted so that K7 + 2*(K0+..+K6) = 1024 exactly.
// sigma0 = 1.6 and k = 2^(1/3) are this design's choice (standard SIFT values).
package sift_pkg;

  localparam int PIX_W   = 8;
  localparam int FRAC    = 10;              // SUM = 1024 = 2^FRAC
  localparam int G_W     = PIX_W + FRAC;    // 8.10 Gaussian pixel
  localparam int K_W     = 11;              // a kernel weight is at most 1024
  localparam int TAPS    = 15;
  localparam int HALF    = 7;               // (TAPS-1)/2
  localparam int NSCALES = 6;
  localparam int NDOG    = NSCALES - 1;
  localparam int DOG_W   = 9;
  localparam int XY_W    = 16;

  typedef logic [PIX_W-1:0]        pix_t;
  typedef logic [G_W-1:0]          gpix_t;
  typedef logic signed [DOG_W-1:0] dog_t;
  typedef logic [XY_W-1:0]         coord_t;

  // One record of the feature information store: the centre pixel and which
  // of the three detection units (DoG scales 1, 2, 3) found a keypoint there.
  typedef struct packed {
    coord_t     x;
    coord_t     y;
    logic [2:0] scale_hit;
  } kp_rec_t;

  // K_i for scale j (i = 0..7, i = 7 is the centre tap).
  function automatic logic [K_W-1:0] gauss_k(input int j, input int i);
    logic [K_W-1:0] t [NSCALES][8];
    t[0] = '{11'd0,  11'd0,  11'd2,  11'd11, 11'd44, 11'd117, 11'd210, 11'd256};
    t[1] = '{11'd0,  11'd2,  11'd9,  11'd28, 11'd67, 11'd124, 11'd179, 11'd206};
    t[2] = '{11'd4,  11'd10, 11'd23, 11'd47, 11'd80, 11'd118, 11'd149, 11'd162};
    t[3] = '{11'd12, 11'd22, 11'd38, 11'd60, 11'd84, 11'd107, 11'd124, 11'd130};
    t[4] = '{11'd24, 11'd36, 11'd50, 11'd66, 11'd82, 11'd96,  11'd105, 11'd106};
    t[5] = '{11'd36, 11'd47, 11'd58, 11'd69, 11'd78, 11'd86,  11'd92,  11'd92};
    return t[j][i];
  endfunction

endpackage
