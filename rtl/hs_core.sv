// hs_core: one Horn and Schunck iteration over a streamed frame.
//
// Each pixel record carries the gradients (Ix, Iy, It) and the current flow
// increment (du, dv).  A 3x3 stream_window gives the neighbourhood of every
// pixel; the "avg" step forms (ubar, vbar) as the mean of the four direct
// neighbours (borders clamped), and the "calc" step applies
//
//   du' = ubar - Ix * (Ix*ubar + Iy*vbar + It) / (alpha^2 + Ix^2 + Iy^2)
//   dv' = vbar - Iy * (Ix*ubar + Iy*vbar + It) / (alpha^2 + Ix^2 + Iy^2)
//
// The common quotient is computed once by a pipelined divider (fx_div), so
// the core accepts one pixel per clock.  The record leaves with the gradients
// unchanged and the new increment, in raster order.
//
// Timing: out_valid follows in_valid by LATENCY = width + 2 (window) + 2 +
// DIV_NW (divider) + 1 clocks.  The stream rules are those of stream_window:
// one gap-free frame, keep clocking after it, pulse clear before a frame of a
// new size.
//
// The grad/avg/calc split and the update equation follow the original work,
// in the classic form with the correction subtracted.  The 4-neighbour average, fixed-point
// formats and divider are this design's choices; the original used floating
// point.
module hs_core
  import hs_pkg::*;
#(
  parameter int unsigned W_MAX  = 1024,
  parameter int unsigned H_MAX  = 1024,
  parameter int unsigned ALPHA2 = 64,   // alpha^2 in (intensity units)^2
  localparam int unsigned WW    = $clog2(W_MAX + 1),
  localparam int unsigned HW    = $clog2(H_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic [WW-1:0] width,
  input  logic [HW-1:0] height,
  input  logic          in_valid,
  input  hs_rec_t       in_rec,
  output logic          out_valid,
  output hs_rec_t       out_rec
);

  // The quotient r = num/den carries (GRAD_F + VEL_F) - 2*GRAD_F + RF
  // fraction bits; Ix * r then has VEL_F + RF, so the update shifts by RF.
  localparam int unsigned RF     = 8;              // extra quotient fraction bits
  localparam int unsigned DIV_NW = 30 + RF;        // |num| < 2^30
  localparam int unsigned DIV_DW = 32;

  // ---------------- window ----------------
  logic          w_valid;
  logic [WW-1:0] w_cx;
  logic [HW-1:0] w_cy;
  logic [$bits(hs_rec_t)-1:0] w_raw [3][3];

  stream_window #(.DW($bits(hs_rec_t)), .K(3), .W_MAX(W_MAX), .H_MAX(H_MAX)) u_win (
    .clk, .rst, .clear, .width, .height,
    .in_valid, .in_data(in_rec),
    .c_valid(w_valid), .cx(w_cx), .cy(w_cy), .win(w_raw)
  );

  hs_rec_t c_rec, n_rec, s_rec, e_rec, w_rec;
  assign c_rec = hs_rec_t'(w_raw[1][1]);
  assign n_rec = hs_rec_t'(w_raw[0][1]);
  assign s_rec = hs_rec_t'(w_raw[2][1]);
  assign w_rec = hs_rec_t'(w_raw[1][0]);
  assign e_rec = hs_rec_t'(w_raw[1][2]);

  // ---------------- stage 1: avg ----------------
  logic  s1_valid;
  grad_t s1_ix, s1_iy, s1_it;
  vel_t  s1_ub, s1_vb;

  always_ff @(posedge clk) begin
    logic signed [VEL_W+1:0] su, sv;
    su = (VEL_W+2)'(signed'(n_rec.d.u)) + (VEL_W+2)'(signed'(s_rec.d.u))
       + (VEL_W+2)'(signed'(e_rec.d.u)) + (VEL_W+2)'(signed'(w_rec.d.u));
    sv = (VEL_W+2)'(signed'(n_rec.d.v)) + (VEL_W+2)'(signed'(s_rec.d.v))
       + (VEL_W+2)'(signed'(e_rec.d.v)) + (VEL_W+2)'(signed'(w_rec.d.v));
    s1_valid <= rst ? 1'b0 : w_valid;
    s1_ix    <= c_rec.ix;
    s1_iy    <= c_rec.iy;
    s1_it    <= c_rec.it;
    s1_ub    <= vel_t'(su >>> 2);
    s1_vb    <= vel_t'(sv >>> 2);
  end

  // ---------------- stage 2: numerator and denominator ----------------
  logic                     s2_valid;
  grad_t                    s2_ix, s2_iy;
  vel_t                     s2_ub, s2_vb;
  logic signed [47:0]       s2_num;   // Q(GRAD_F+VEL_F)
  logic        [DIV_DW-1:0] s2_den;   // Q(2*GRAD_F)

  always_ff @(posedge clk) begin
    logic signed [47:0] num;
    logic        [47:0] den;
    num = 48'(s1_ix) * 48'(s1_ub) + 48'(s1_iy) * 48'(s1_vb)
        + (48'(s1_it) <<< VEL_F);
    den = 48'(ALPHA2) * (48'd1 << (2*GRAD_F))
        + 48'(s1_ix) * 48'(s1_ix) + 48'(s1_iy) * 48'(s1_iy);
    s2_valid <= rst ? 1'b0 : s1_valid;
    s2_ix    <= s1_ix;
    s2_iy    <= s1_iy;
    s2_ub    <= s1_ub;
    s2_vb    <= s1_vb;
    s2_num   <= num;
    s2_den   <= DIV_DW'(den);
  end

  // ---------------- divider: r = |num| * 2^RF / den ----------------
  typedef struct packed {
    logic  neg;
    grad_t ix;
    grad_t iy;
    grad_t it;
    vel_t  ub;
    vel_t  vb;
  } side_t;

  side_t              d_in_side, d_out_side;
  logic               d_out_valid;
  logic [DIV_NW-1:0]  d_quo;
  logic [47:0]        abs_num;

  // The centre gradient It is needed again on output; carry it in the
  // sideband from the window.  It is re-timed through stages 1 and 2.
  grad_t s2_it;
  always_ff @(posedge clk) s2_it <= s1_it;

  assign abs_num   = s2_num[47] ? 48'(-s2_num) : 48'(s2_num);
  assign d_in_side = '{neg: s2_num[47], ix: s2_ix, iy: s2_iy, it: s2_it,
                       ub: s2_ub, vb: s2_vb};

  fx_div #(.NW(DIV_NW), .DW(DIV_DW), .SW($bits(side_t))) u_div (
    .clk, .rst,
    .in_valid(s2_valid),
    .num(DIV_NW'(abs_num) << RF),
    .den(s2_den),
    .side_in(d_in_side),
    .out_valid(d_out_valid),
    .quo(d_quo),
    .side_out(d_out_side)
  );

  // ---------------- stage 3: update ----------------
  always_ff @(posedge clk) begin
    logic signed [63:0] r, pu, pv;
    r  = d_out_side.neg ? -64'(d_quo) : 64'(d_quo);
    pu = (64'(d_out_side.ix) * r) >>> RF;
    pv = (64'(d_out_side.iy) * r) >>> RF;
    out_valid     <= rst ? 1'b0 : d_out_valid;
    out_rec.ix    <= d_out_side.ix;
    out_rec.iy    <= d_out_side.iy;
    out_rec.it    <= d_out_side.it;
    out_rec.d.u   <= sat_vel(48'(64'(d_out_side.ub) - pu));
    out_rec.d.v   <= sat_vel(48'(64'(d_out_side.vb) - pv));
  end

endmodule
