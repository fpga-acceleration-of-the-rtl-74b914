// tb_hs_chain: a chain of 3 H&S cores on a random 7 x 5 frame, run once with
// each tap n_active = 1, 2, 3.  The output must equal n_active successive
// iterations of the update equation computed here over the whole frame, and
// arrive n_active core latencies after the input.
module tb_hs_chain;
  import hs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 7, H = 5, NC = 3, ALPHA2 = 64;
  localparam int CORE_LAT = W + 2 + 2 + 38 + 1;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       in_valid = 0, out_valid;
  hs_rec_t    in_rec = '0, out_rec;
  logic [1:0] n_active = 1;

  hs_chain #(.NCORES(NC), .W_MAX(8), .H_MAX(8), .ALPHA2(ALPHA2)) dut (
    .clk, .rst, .clear(1'b0), .width(4'(W)), .height(4'(H)), .n_active,
    .in_valid, .in_rec, .out_valid, .out_rec);

  int checks = 0, failures = 0, n_out = 0, cyc = 0, t_in = -1, t_out = -1;
  hs_rec_t img [H][W];
  hs_rec_t ref_img [NC+1][H][W];

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && t_in < 0) t_in <= cyc;
    if (out_valid && !rst) begin
      int x, y;
      if (t_out < 0) t_out <= cyc;
      x = n_out % W; y = n_out / W;
      checks++;
      if (out_rec != ref_img[n_active][y][x]) begin
        failures++;
        $display("FAIL n=%0d (%0d,%0d) got %0d,%0d want %0d,%0d", n_active, x, y, out_rec.d.u,
                 out_rec.d.v, ref_img[n_active][y][x].d.u, ref_img[n_active][y][x].d.v);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x].ix  = grad_t'($signed($urandom_range(0, 1000)) - 500);
        img[y][x].iy  = grad_t'($signed($urandom_range(0, 1000)) - 500);
        img[y][x].it  = grad_t'($signed($urandom_range(0, 1000)) - 500);
        img[y][x].d   = '0;
        ref_img[0][y][x] = img[y][x];
      end
    for (int k = 1; k <= NC; k++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          longint u1, v1;
          hs_rec_t p [5];
          int xl, xr, yu, yd;
          xl = clampi(x - 1, 0, W - 1); xr = clampi(x + 1, 0, W - 1);
          yu = clampi(y - 1, 0, H - 1); yd = clampi(y + 1, 0, H - 1);
          hs_update(img[y][x].ix, img[y][x].iy, img[y][x].it,
                    ref_img[k-1][yu][x].d.u, ref_img[k-1][yd][x].d.u, ref_img[k-1][y][xr].d.u, ref_img[k-1][y][xl].d.u,
                    ref_img[k-1][yu][x].d.v, ref_img[k-1][yd][x].d.v, ref_img[k-1][y][xr].d.v, ref_img[k-1][y][xl].d.v,
                    ALPHA2, u1, v1);
          ref_img[k][y][x] = img[y][x];
          ref_img[k][y][x].d.u = vel_t'(u1);
          ref_img[k][y][x].d.v = vel_t'(v1);
        end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int k = 1; k <= NC; k++) begin
      n_active <= 2'(k);
      n_out = 0; t_out = -1; t_in = -1;
      @(posedge clk);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          in_valid <= 1; in_rec <= img[y][x];
          @(posedge clk);
        end
      in_valid <= 0;
      repeat (NC * CORE_LAT + 10) @(posedge clk);
      checks++;
      if (n_out != W * H) begin failures++; $display("FAIL n=%0d count %0d", k, n_out); end
      checks++;
      if (t_out - t_in != k * CORE_LAT) begin failures++; $display("FAIL n=%0d latency %0d", k, t_out - t_in); end
    end
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
