// gauss_down: pyramid reduction, 5x5 Gaussian filter then 2:1 decimation.
//
// A 5x5 stream_window supplies each pixel's neighbourhood (clamped at the
// frame edge); the separable binomial kernel [1 4 6 4 1] x [1 4 6 4 1] / 256
// smooths it, rounded to 8 bits.  Only pixels at even (x, y) are kept: they
// leave with their coordinates in the half-size image (ox, oy) = (x/2, y/2).
// Latency from the input pixel to its filtered value: 2*width + 4 clocks.
// The 5x5 Gaussian kernel and the factor of 2 are the original design's; the
// binomial weights and the clamped border are this design's choice.
module gauss_down
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
  input  pix_t          in_pix,
  output logic          out_valid,
  output logic [WW-1:0] ox,
  output logic [HW-1:0] oy,
  output pix_t          out_pix
);

  localparam int unsigned KW [5] = '{1, 4, 6, 4, 1};

  logic          w_valid;
  logic [WW-1:0] w_cx;
  logic [HW-1:0] w_cy;
  logic [PIX_W-1:0] w_raw [5][5];

  stream_window #(.DW(PIX_W), .K(5), .W_MAX(W_MAX), .H_MAX(H_MAX)) u_win (
    .clk, .rst, .clear, .width, .height,
    .in_valid, .in_data(in_pix),
    .c_valid(w_valid), .cx(w_cx), .cy(w_cy), .win(w_raw)
  );

  always_ff @(posedge clk) begin
    logic [17:0] acc;
    acc = 18'd128;                      // rounding
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        acc += 18'(KW[r] * KW[c]) * 18'(w_raw[r][c]);
    out_valid <= rst ? 1'b0 : (w_valid && !w_cx[0] && !w_cy[0]);
    ox        <= w_cx >> 1;
    oy        <= w_cy >> 1;
    out_pix   <= pix_t'(acc >> 8);
  end

endmodule
