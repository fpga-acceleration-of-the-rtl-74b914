// warp_core: motion compensation of I2 by the initial velocity.
//
// For each pixel (x, y) it samples I2 at (x + u, y + v), with (u, v) the
// up-scaled velocity from the coarser level, by bi-cubic (4x4 neighbourhood,
// Keys kernel with a = -1/2) or bi-linear (2x2) interpolation, chosen by the
// INTERP parameter.  I2 streams into a circular buffer of NR = 2*RANGE + 5
// rows (the "streaming window"), so the sample may lie up to RANGE rows above
// or below the current row; |v| beyond RANGE is clamped to RANGE and the
// sample point is clamped into the frame.
//
// Interface: I2 arrives as its own gap-free raster stream (i2_valid, i2_pix)
// that must lead the main stream by LOOKAHEAD = (RANGE + 3) * width clocks.
// The main stream (in_valid, in_i1, in_flow) brings I1 and (u, v) of the same
// pixel; I1 is carried along so that out_pair holds I1 and the warped I2 of
// one pixel, both in 8.4 fixed point.  Latency: 3 clocks.
// Bi-linear/bi-cubic and the streaming window follow the original design;
// the Keys kernel, the fixed-point formats and the clamping are this
// design's choices.  Both modes read a 4x4 block; bi-linear gives the outer
// taps zero weight.
module warp_core
  import hs_pkg::*;
#(
  parameter int unsigned W_MAX  = 1024,
  parameter int unsigned H_MAX  = 1024,
  parameter int unsigned RANGE  = 7,
  parameter interp_e     INTERP = INTERP_BICUBIC,
  localparam int unsigned WW    = $clog2(W_MAX + 1),
  localparam int unsigned HW    = $clog2(H_MAX + 1),
  localparam int unsigned NR    = 2 * RANGE + 5,
  localparam int unsigned LW    = $clog2(W_MAX),
  localparam int unsigned SW    = $clog2(NR)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic [WW-1:0] width,
  input  logic [HW-1:0] height,
  input  logic          i2_valid,
  input  pix_t          i2_pix,
  input  logic          in_valid,
  input  pix_t          in_i1,
  input  flow_t         in_flow,
  output logic          out_valid,
  output inten_pair_t   out_pair
);

  // ---------------- I2 row buffer ----------------
  pix_t                    rowbuf [NR][W_MAX];
  logic [WW-1:0]           wcol;
  logic [SW-1:0]           wslot;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wcol  <= '0;
      wslot <= '0;
    end else if (i2_valid) begin
      if (wcol == width - 1'b1) begin
        wcol  <= '0;
        wslot <= (wslot == SW'(NR - 1)) ? '0 : wslot + 1'b1;
      end else begin
        wcol <= wcol + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (i2_valid) rowbuf[wslot][LW'(wcol)] <= i2_pix;
  end

  // ---------------- position of the main stream ----------------
  logic [WW-1:0]         x;
  logic [HW-1:0]         y;
  logic [SW-1:0]         yslot;   // slot holding row y

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      x     <= '0;
      y     <= '0;
      yslot <= '0;
    end else if (in_valid) begin
      if (x == width - 1'b1) begin
        x     <= '0;
        y     <= y + 1'b1;
        yslot <= (yslot == SW'(NR - 1)) ? '0 : yslot + 1'b1;
      end else begin
        x <= x + 1'b1;
      end
    end
  end

  // ---------------- stage A: sample point and 4x4 read ----------------
  typedef logic signed [31:0] s32_t;

  s32_t xs, ys, ylo, yhi, x0, y0;
  logic [VEL_F-1:0] fx, fy;
  pix_t             blk [4][4];

  always_comb begin
    xs  = (s32_t'(x) <<< VEL_F) + s32_t'(in_flow.u);
    ys  = (s32_t'(y) <<< VEL_F) + s32_t'(in_flow.v);
    ylo = s32_t'(y) - s32_t'(RANGE);
    yhi = s32_t'(y) + s32_t'(RANGE);
    if (ylo < 0) ylo = 0;
    if (yhi > s32_t'(height) - 1) yhi = s32_t'(height) - 1;
    if (xs < 0) xs = 0;
    if (xs > ((s32_t'(width) - 1) <<< VEL_F)) xs = (s32_t'(width) - 1) <<< VEL_F;
    if (ys < (ylo <<< VEL_F)) ys = ylo <<< VEL_F;
    if (ys > (yhi <<< VEL_F)) ys = yhi <<< VEL_F;
    x0 = xs >>> VEL_F;
    y0 = ys >>> VEL_F;
    fx = xs[VEL_F-1:0];
    fy = ys[VEL_F-1:0];
    for (int r = 0; r < 4; r++) begin
      s32_t ry, slot;
      ry = y0 + r - 1;
      if (ry < 0) ry = 0;
      if (ry > s32_t'(height) - 1) ry = s32_t'(height) - 1;
      slot = s32_t'(yslot) + (ry - s32_t'(y));
      if (slot < 0) slot += NR;
      if (slot >= NR) slot -= NR;
      for (int c = 0; c < 4; c++) begin
        s32_t cx;
        cx = x0 + c - 1;
        if (cx < 0) cx = 0;
        if (cx > s32_t'(width) - 1) cx = s32_t'(width) - 1;
        blk[r][c] = rowbuf[slot[SW-1:0]][cx[LW-1:0]];
      end
    end
  end

  logic             a_valid;
  pix_t             a_i1;
  pix_t             a_blk [4][4];
  logic [VEL_F-1:0] a_fx, a_fy;

  always_ff @(posedge clk) begin
    a_valid <= rst ? 1'b0 : in_valid;
    a_i1    <= in_i1;
    a_blk   <= blk;
    a_fx    <= fx;
    a_fy    <= fy;
  end

  // ---------------- interpolation weights ----------------
  // Each weight is returned as 2*w in Q24 (t in Q8).
  typedef logic signed [31:0] wgt_t;
  typedef wgt_t wvec_t [4];

  function automatic wvec_t weights(input logic [VEL_F-1:0] t8);
    wvec_t w;
    wgt_t t, t2, t3;
    t  = wgt_t'(t8) <<< 16;                     // Q24
    t2 = (wgt_t'(t8) * wgt_t'(t8)) <<< 8;       // Q24
    t3 = wgt_t'(t8) * wgt_t'(t8) * wgt_t'(t8);  // Q24
    if (INTERP == INTERP_BICUBIC) begin
      w[0] = -t3 + 2 * t2 - t;
      w[1] = 3 * t3 - 5 * t2 + (wgt_t'(2) <<< 24);
      w[2] = -3 * t3 + 4 * t2 + t;
      w[3] = t3 - t2;
    end else begin
      w[0] = 0;
      w[1] = 2 * ((wgt_t'(1) <<< 24) - t);
      w[2] = 2 * t;
      w[3] = 0;
    end
    return w;
  endfunction

  // ---------------- stage B: horizontal pass ----------------
  typedef logic signed [47:0] s48_t;
  logic  b_valid;
  pix_t  b_i1;
  s48_t  b_h [4];                 // Q8
  logic [VEL_F-1:0] b_fy;

  always_ff @(posedge clk) begin
    wvec_t wx;
    wx = weights(a_fx);
    for (int r = 0; r < 4; r++) begin
      s48_t acc;
      acc = 0;
      for (int c = 0; c < 4; c++) acc += s48_t'(wx[c]) * s48_t'({1'b0, a_blk[r][c]});
      b_h[r] <= acc >>> 17;        // 2*w Q24 -> value Q8
    end
    b_valid <= rst ? 1'b0 : a_valid;
    b_i1    <= a_i1;
    b_fy    <= a_fy;
  end

  // ---------------- stage C: vertical pass ----------------
  always_ff @(posedge clk) begin
    wvec_t wy;
    s48_t  acc;
    wy  = weights(b_fy);
    acc = 0;
    for (int r = 0; r < 4; r++) acc += s48_t'(wy[r]) * b_h[r];
    acc = acc >>> (25 + 8 - INT_F);  // Q(25+8) -> Q(INT_F)
    if (acc < 0) acc = 0;
    if (acc > s48_t'((1 << INT_W) - 1)) acc = s48_t'((1 << INT_W) - 1);
    out_valid   <= rst ? 1'b0 : b_valid;
    out_pair.i1 <= inten_t'({b_i1, {INT_F{1'b0}}});
    out_pair.i2 <= inten_t'(acc);
  end

endmodule
