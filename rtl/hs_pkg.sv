// hs_pkg: types, number formats and helper functions shared by the
// multi-scale Horn and Schunck optical-flow pipeline.
//
// Number formats (this design's own choice; the original work used 16- and
// 32-bit floating point):
//   pixels      8-bit unsigned integers on input
//   intensity   12-bit unsigned, 8 integer + INT_F=4 fraction bits (warped I2)
//   gradients   16-bit signed, GRAD_F=4 fraction bits
//   velocities  16-bit signed, VEL_F=8 fraction bits (range +-128 pixel)
package hs_pkg;

  localparam int PIX_W  = 8;
  localparam int INT_W  = 12;
  localparam int INT_F  = 4;
  localparam int GRAD_W = 16;
  localparam int GRAD_F = 4;
  localparam int VEL_W  = 16;
  localparam int VEL_F  = 8;

  typedef logic [PIX_W-1:0]         pix_t;
  typedef logic [INT_W-1:0]         inten_t;
  typedef logic signed [GRAD_W-1:0] grad_t;
  typedef logic signed [VEL_W-1:0]  vel_t;

  // Velocity pair (u,v) or increment (du,dv).
  typedef struct packed {
    vel_t u;
    vel_t v;
  } flow_t;

  // Per-pixel record that travels through the chain of H&S cores.
  typedef struct packed {
    grad_t ix;
    grad_t iy;
    grad_t it;
    flow_t d;     // current increment (du,dv)
  } hs_rec_t;

  // Pair of intensities at the same pixel: I1 and warped I2.
  typedef struct packed {
    inten_t i1;
    inten_t i2;
  } inten_pair_t;

  typedef enum logic [1:0] {INTERP_BILINEAR = 2'd0, INTERP_BICUBIC = 2'd1} interp_e;

  // Saturate a wide signed value to a velocity.
  function automatic vel_t sat_vel(input logic signed [47:0] x);
    if (x > 48'sd32767)       return vel_t'(16'sh7fff);
    else if (x < -48'sd32768) return vel_t'(16'sh8000);
    else                      return vel_t'(x[15:0]);
  endfunction

  // Number of pixels of pyramid level l (width and height halve per level).
  function automatic int unsigned level_pixels(input int unsigned w,
                                               input int unsigned h,
                                               input int unsigned l);
    return (w >> l) * (h >> l);
  endfunction

  // Address of the first pixel of level l in a memory holding levels 0.. .
  function automatic int unsigned level_base(input int unsigned w,
                                             input int unsigned h,
                                             input int unsigned l);
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < 8; k++)
      if (k < l) b += (w >> k) * (h >> k);
    return b;
  endfunction

endpackage
