// tb_gauss_down: a random 12 x 10 frame through the 5x5 Gaussian reducer.
// Each output must be the binomial-weighted, rounded mean of the clamped 5x5
// neighbourhood of an even pixel, at half coordinates; 6 x 5 outputs in
// raster order; first output 2*width + 4 clocks after the first input.
module tb_gauss_down;
  import hs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 12, H = 10;
  localparam int KW [5] = '{1, 4, 6, 4, 1};
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       in_valid = 0, out_valid;
  pix_t       in_pix = 0, out_pix;
  logic [4:0] ox;
  logic [4:0] oy;

  gauss_down #(.W_MAX(16), .H_MAX(16)) dut (
    .clk, .rst, .clear(1'b0), .width(5'(W)), .height(5'(H)),
    .in_valid, .in_pix, .out_valid, .ox, .oy, .out_pix);

  int checks = 0, failures = 0, n_out = 0, cyc = 0, first_in = -1, first_out = -1;
  int img [H][W];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in <= cyc;
    if (out_valid && !rst) begin
      int x, y, acc;
      if (first_out < 0) first_out <= cyc;
      x = n_out % (W / 2); y = n_out / (W / 2);
      acc = 128;
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++)
          acc += KW[r] * KW[c] * img[clampi(2*y + r - 2, 0, H - 1)][clampi(2*x + c - 2, 0, W - 1)];
      checks++;
      if (ox != x || oy != y || out_pix != pix_t'(acc >> 8)) begin
        failures++;
        $display("FAIL (%0d,%0d) got (%0d,%0d) %0d want %0d", x, y, ox, oy, out_pix, acc >> 8);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) img[y][x] = $urandom_range(0, 255);
    img[0][0] = 255; img[0][1] = 255; img[1][0] = 255; img[1][1] = 255;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        in_valid <= 1; in_pix <= pix_t'(img[y][x]);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (4 * W) @(posedge clk);
    checks++;
    if (n_out != (W / 2) * (H / 2)) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (first_out - first_in != 2 * W + 4) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
