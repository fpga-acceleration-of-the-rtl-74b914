// tb_warp_core: warps a random 16 x 12 I2 by random per-pixel velocities
// (including ones beyond the +-RANGE window and outside the frame) with a
// bi-cubic and a bi-linear instance.  Each output is compared with the
// interpolation evaluated here in floating point (Keys cubic kernel /
// linear weights, sample point and taps clamped as specified), within 2/16
// of an intensity step; I1 must pass alongside; latency is 3 clocks.
module tb_warp_core;
  import hs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 16, H = 12, R = 3, LOOK = (R + 3) * W;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic        i2_valid = 0, in_valid = 0;
  pix_t        i2_pix = 0, in_i1 = 0;
  flow_t       in_flow = '0;
  logic        ov_c, ov_l;
  inten_pair_t op_c, op_l;

  warp_core #(.W_MAX(16), .H_MAX(16), .RANGE(R), .INTERP(INTERP_BICUBIC)) dut_c (
    .clk, .rst, .clear(1'b0), .width(5'(W)), .height(5'(H)),
    .i2_valid, .i2_pix, .in_valid, .in_i1, .in_flow, .out_valid(ov_c), .out_pair(op_c));
  warp_core #(.W_MAX(16), .H_MAX(16), .RANGE(R), .INTERP(INTERP_BILINEAR)) dut_l (
    .clk, .rst, .clear(1'b0), .width(5'(W)), .height(5'(H)),
    .i2_valid, .i2_pix, .in_valid, .in_i1, .in_flow, .out_valid(ov_l), .out_pair(op_l));

  int checks = 0, failures = 0, n_out = 0, cyc = 0, first_in = -1, first_out = -1;
  int i1 [H][W], i2 [H][W], fu [H][W], fv [H][W];

  function automatic real ref_val(input int x, input int y, input bit cubic);
    real xs, ys, fx, fy, acc, h, w_x, w_y;
    int x0, y0, ylo, yhi;
    xs = x + fu[y][x] / 256.0; ys = y + fv[y][x] / 256.0;
    ylo = (y - R < 0) ? 0 : y - R; yhi = (y + R > H - 1) ? H - 1 : y + R;
    if (xs < 0) xs = 0; if (xs > W - 1) xs = W - 1;
    if (ys < ylo) ys = ylo; if (ys > yhi) ys = yhi;
    x0 = int'($floor(xs)); y0 = int'($floor(ys));
    fx = xs - x0; fy = ys - y0;
    acc = 0;
    for (int r = 0; r < 4; r++) begin
      h = 0;
      for (int c = 0; c < 4; c++) begin
        w_x = cubic ? keys_w(c, fx) : (c == 1 ? 1.0 - fx : c == 2 ? fx : 0.0);
        h += w_x * i2[clampi(y0 + r - 1, 0, H - 1)][clampi(x0 + c - 1, 0, W - 1)];
      end
      w_y = cubic ? keys_w(r, fy) : (r == 1 ? 1.0 - fy : r == 2 ? fy : 0.0);
      acc += w_y * h;
    end
    if (acc < 0) acc = 0;
    if (acc > 4095.0 / 16.0) acc = 4095.0 / 16.0;
    return acc;
  endfunction

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in <= cyc;
    if (ov_c && !rst) begin
      int x, y;
      real rc, rl;
      if (first_out < 0) first_out <= cyc;
      x = n_out % W; y = n_out / W;
      rc = ref_val(x, y, 1); rl = ref_val(x, y, 0);
      checks += 3;
      if (op_c.i1 != inten_t'(i1[y][x] * 16) || op_l.i1 != op_c.i1) begin
        failures++; $display("FAIL i1 (%0d,%0d)", x, y);
      end
      if ((op_c.i2 / 16.0 - rc) > 0.125 || (op_c.i2 / 16.0 - rc) < -0.125) begin
        failures++; $display("FAIL cubic (%0d,%0d) flow %0d,%0d got %f want %f", x, y, fu[y][x], fv[y][x], op_c.i2 / 16.0, rc);
      end
      if (!ov_l || (op_l.i2 / 16.0 - rl) > 0.125 || (op_l.i2 / 16.0 - rl) < -0.125) begin
        failures++; $display("FAIL linear (%0d,%0d) got %f want %f", x, y, op_l.i2 / 16.0, rl);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        i1[y][x] = $urandom_range(0, 255);
        i2[y][x] = $urandom_range(0, 255);
        fu[y][x] = $signed($urandom_range(0, 2 * 5 * 256)) - 5 * 256;
        fv[y][x] = $signed($urandom_range(0, 2 * 5 * 256)) - 5 * 256;
      end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < W * H + LOOK; t++) begin
      int n;
      n = t - LOOK;
      i2_valid <= (t < W * H);
      if (t < W * H) i2_pix <= pix_t'(i2[t / W][t % W]);
      in_valid <= (n >= 0);
      if (n >= 0) begin
        in_i1   <= pix_t'(i1[n / W][n % W]);
        in_flow <= '{u: vel_t'(fu[n / W][n % W]), v: vel_t'(fv[n / W][n % W])};
      end
      @(posedge clk);
    end
    in_valid <= 0; i2_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (n_out != W * H) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (first_out - first_in != 3) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
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
