// tb_hs_core: one H&S iteration on a random 11 x 6 frame of records.  Each
// output increment is compared with the update equation evaluated here in
// 64-bit integers (4-neighbour mean with clamped borders); gradients must
// pass unchanged; the latency must be width + 2 + 2 + 38 + 1 clocks.  One
// frame uses large gradients, the other small gradients so that alpha^2
// dominates the denominator.
module tb_hs_core;
  import hs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 11, H = 6, ALPHA2 = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic    in_valid = 0, out_valid;
  hs_rec_t in_rec = '0, out_rec;

  hs_core #(.W_MAX(16), .H_MAX(8), .ALPHA2(ALPHA2)) dut (
    .clk, .rst, .clear(1'b0), .width(5'(W)), .height(4'(H)),
    .in_valid, .in_rec, .out_valid, .out_rec);

  int checks = 0, failures = 0, n_out = 0, cyc = 0, first_in = -1, first_out = -1;
  hs_rec_t img [2][H][W];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in <= cyc;
    if (out_valid && !rst) begin
      int x, y, f, xl, xr, yu, yd;
      longint u1, v1;
      hs_rec_t c;
      if (first_out < 0) first_out <= cyc;
      f = n_out / (W * H);
      x = (n_out % (W * H)) % W; y = (n_out % (W * H)) / W;
      xl = clampi(x - 1, 0, W - 1); xr = clampi(x + 1, 0, W - 1);
      yu = clampi(y - 1, 0, H - 1); yd = clampi(y + 1, 0, H - 1);
      c = img[f][y][x];
      hs_update(c.ix, c.iy, c.it,
                img[f][yu][x].d.u, img[f][yd][x].d.u, img[f][y][xr].d.u, img[f][y][xl].d.u,
                img[f][yu][x].d.v, img[f][yd][x].d.v, img[f][y][xr].d.v, img[f][y][xl].d.v,
                ALPHA2, u1, v1);
      checks++;
      if (out_rec.ix != c.ix || out_rec.iy != c.iy || out_rec.it != c.it ||
          longint'(out_rec.d.u) != u1 || longint'(out_rec.d.v) != v1) begin
        failures++;
        $display("FAIL f%0d (%0d,%0d) got u=%0d v=%0d want %0d %0d", f, x, y, out_rec.d.u, out_rec.d.v, u1, v1);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int g;
          g = (f == 0) ? 4080 : 40;
          img[f][y][x].ix  = grad_t'($signed($urandom_range(0, 2 * g)) - g);
          img[f][y][x].iy  = grad_t'($signed($urandom_range(0, 2 * g)) - g);
          img[f][y][x].it  = grad_t'($signed($urandom_range(0, 2 * g)) - g);
          img[f][y][x].d.u = vel_t'($signed($urandom_range(0, 4096)) - 2048);
          img[f][y][x].d.v = vel_t'($signed($urandom_range(0, 4096)) - 2048);
        end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 2; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_rec <= img[f][y][x];
          @(posedge clk);
        end
      in_valid <= 0;
      repeat (W + 60) @(posedge clk);
    end
    checks++;
    if (n_out != 2 * W * H) begin failures++; $display("FAIL count %0d", n_out); end
    checks++;
    if (first_out - first_in != W + 2 + 2 + 38 + 1) begin failures++; $display("FAIL latency %0d", first_out - first_in); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
