// tb_hs_grad: streams a random 10 x 7 frame of (I1, warped I2) pairs and
// compares Ix, Iy, It of every pixel with the 2x2x2 kernel computed here
// (right/lower neighbours clamped at the edge), plus the latency width + 3.
module tb_hs_grad;
  import hs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 10, H = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_valid;
  inten_pair_t in_pair = '0;
  hs_rec_t     out_rec;

  hs_grad #(.W_MAX(16), .H_MAX(8)) dut (
    .clk, .rst, .clear(1'b0), .width(5'(W)), .height(4'(H)),
    .in_valid, .in_pair, .out_valid, .out_rec);

  int checks = 0, failures = 0, n_out = 0, cyc = 0, first_in = -1, first_out = -1;
  int i1 [H][W], i2 [H][W];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in <= cyc;
    if (out_valid && !rst) begin
      int x, y, x1, y1, sx, sy, st;
      if (first_out < 0) first_out <= cyc;
      x = n_out % W; y = n_out / W;
      x1 = clampi(x + 1, 0, W - 1); y1 = clampi(y + 1, 0, H - 1);
      sx = (i1[y][x1] - i1[y][x]) + (i1[y1][x1] - i1[y1][x]) + (i2[y][x1] - i2[y][x]) + (i2[y1][x1] - i2[y1][x]);
      sy = (i1[y1][x] - i1[y][x]) + (i1[y1][x1] - i1[y][x1]) + (i2[y1][x] - i2[y][x]) + (i2[y1][x1] - i2[y][x1]);
      st = (i2[y][x] + i2[y][x1] + i2[y1][x] + i2[y1][x1]) - (i1[y][x] + i1[y][x1] + i1[y1][x] + i1[y1][x1]);
      checks++;
      if (out_rec.ix != grad_t'(sx >>> 2) || out_rec.iy != grad_t'(sy >>> 2) ||
          out_rec.it != grad_t'(st >>> 2) || out_rec.d != '0) begin
        failures++;
        $display("FAIL (%0d,%0d) got %0d %0d %0d want %0d %0d %0d", x, y,
                 out_rec.ix, out_rec.iy, out_rec.it, sx >>> 2, sy >>> 2, st >>> 2);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        i1[y][x] = $urandom_range(0, 4095);
        i2[y][x] = $urandom_range(0, 4095);
      end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        in_valid <= 1;
        in_pair  <= '{i1: inten_t'(i1[y][x]), i2: inten_t'(i2[y][x])};
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (3 * W) @(posedge clk);
    checks++;
    if (n_out != W * H) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (first_out - first_in != W + 3) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
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
