// hs_grad: spatio-temporal gradients with the 2x2x2 kernel.
//
// Input is a raster stream of intensity pairs (I1, warped I2), both in the
// 8.4 fixed-point intensity format.  A 3x3 stream_window supplies, for the
// pixel (x,y), its right, lower and lower-right neighbours (clamped at the
// frame edge).  Over that 2x2 block in both frames:
//
//   Ix = 1/4 * sum over rows and frames of (right - left)
//   Iy = 1/4 * sum over columns and frames of (lower - upper)
//   It = 1/4 * sum over the 2x2 block of (I2 - I1)
//
// The output record carries Ix, Iy, It (GRAD_F fraction bits) and a zero
// flow increment, ready for the first H&S core.  Latency: width + 3 clocks.
// The 2x2x2 kernel is the original design's; the averaging weights and the
// use of the forward 2x2 block are this design's reading of it.
module hs_grad
  import hs_pkg::*;
#(
  parameter int unsigned W_MAX = 1024,
  parameter int unsigned H_MAX = 1024,
  localparam int unsigned WW   = $clog2(W_MAX + 1),
  localparam int unsigned HW   = $clog2(H_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic [WW-1:0] width,
  input  logic [HW-1:0] height,
  input  logic          in_valid,
  input  inten_pair_t   in_pair,
  output logic          out_valid,
  output hs_rec_t       out_rec
);

  logic          w_valid;
  logic [WW-1:0] w_cx;
  logic [HW-1:0] w_cy;
  logic [$bits(inten_pair_t)-1:0] w_raw [3][3];

  stream_window #(.DW($bits(inten_pair_t)), .K(3), .W_MAX(W_MAX), .H_MAX(H_MAX)) u_win (
    .clk, .rst, .clear, .width, .height,
    .in_valid, .in_data(in_pair),
    .c_valid(w_valid), .cx(w_cx), .cy(w_cy), .win(w_raw)
  );

  inten_pair_t p00, p01, p10, p11;   // p<row><col>: (x,y) (x+1,y) (x,y+1) (x+1,y+1)
  assign p00 = inten_pair_t'(w_raw[1][1]);
  assign p01 = inten_pair_t'(w_raw[1][2]);
  assign p10 = inten_pair_t'(w_raw[2][1]);
  assign p11 = inten_pair_t'(w_raw[2][2]);

  typedef logic signed [INT_W+3:0] acc_t;

  function automatic acc_t ext(input inten_t a);
    return acc_t'({1'b0, a});
  endfunction

  always_ff @(posedge clk) begin
    acc_t sx, sy, st;
    sx = ext(p01.i1) - ext(p00.i1) + ext(p11.i1) - ext(p10.i1)
       + ext(p01.i2) - ext(p00.i2) + ext(p11.i2) - ext(p10.i2);
    sy = ext(p10.i1) - ext(p00.i1) + ext(p11.i1) - ext(p01.i1)
       + ext(p10.i2) - ext(p00.i2) + ext(p11.i2) - ext(p01.i2);
    st = ext(p00.i2) + ext(p01.i2) + ext(p10.i2) + ext(p11.i2)
       - ext(p00.i1) - ext(p01.i1) - ext(p10.i1) - ext(p11.i1);
    out_valid  <= rst ? 1'b0 : w_valid;
    // intensity and gradient share 4 fraction bits: divide the sums by 4
    out_rec.ix <= grad_t'(sx >>> 2);
    out_rec.iy <= grad_t'(sy >>> 2);
    out_rec.it <= grad_t'(st >>> 2);
    out_rec.d  <= '0;
  end

endmodule
