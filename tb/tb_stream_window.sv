// tb_stream_window: streams random frames through a 5x5 window and checks
// every window element against the clamped neighbourhood, the centre
// coordinates, the centre latency and the number of windows.  Frames 0 and 1
// are 9 x 6 with a drain gap between them; frame 2 is 6 x 4 and follows a
// clear pulse given while frame 1 is still in the window, so it also checks
// that clear drops the rest of the old frame and that the row length follows
// the run-time width.
module tb_stream_window;
  localparam int W = 9, H = 6, K = 5, C = K / 2;
  localparam int NF = 3;
  localparam int FW [NF] = '{9, 9, 6};
  localparam int FH [NF] = '{6, 6, 4};
  logic clk = 0, rst = 1, clear = 0;
  always #5 clk = ~clk;

  logic       in_valid = 0;
  logic [7:0] in_data = 0;
  logic       c_valid;
  logic [3:0] cx;
  logic [3:0] cy;
  logic [7:0] win [K][K];
  logic [3:0] width = 4'(W);
  logic [3:0] height = 4'(H);

  stream_window #(.DW(8), .K(K), .W_MAX(12), .H_MAX(8)) dut (
    .clk, .rst, .clear, .width, .height,
    .in_valid, .in_data, .c_valid, .cx, .cy, .win);

  int checks = 0, failures = 0;
  logic [7:0] img [NF][H][W];
  int f_out = 0, n_out = 0, cyc = 0, first_in = -1, first_out = -1;
  int n_frame [NF] = '{0, 0, 0};

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && first_in < 0) first_in <= cyc;
    if (clear) begin
      f_out <= 2;
      n_out <= 0;
    end else if (c_valid && !rst) begin
      int ex, ey, x, y, fw, fh;
      if (first_out < 0) first_out <= cyc;
      fw = FW[f_out]; fh = FH[f_out];
      x = n_out % fw; y = n_out / fw;
      checks++;
      n_frame[f_out]++;
      if (cx != x || cy != y) begin failures++; $display("FAIL pos %0d,%0d vs %0d,%0d", cx, cy, x, y); end
      for (int dy = 0; dy < K; dy++)
        for (int dx = 0; dx < K; dx++) begin
          ex = x + dx - C; ey = y + dy - C;
          ex = ex < 0 ? 0 : ex > fw-1 ? fw-1 : ex;
          ey = ey < 0 ? 0 : ey > fh-1 ? fh-1 : ey;
          checks++;
          if (win[dy][dx] != img[f_out][ey][ex]) begin
            failures++;
            $display("FAIL f%0d (%0d,%0d) d(%0d,%0d): %0d vs %0d", f_out, x, y, dx, dy, win[dy][dx], img[f_out][ey][ex]);
          end
        end
      if (n_out == fw * fh - 1) begin n_out <= 0; f_out <= f_out + 1; end
      else n_out <= n_out + 1;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[f][y][x] = 8'($urandom);
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < NF; f++) begin
      if (f == 2) begin
        // new size while frame 1 is still in the window
        clear <= 1; width <= 4'(FW[2]); height <= 4'(FH[2]);
        @(posedge clk);
        clear <= 0;
      end
      for (int y = 0; y < FH[f]; y++)
        for (int x = 0; x < FW[f]; x++) begin
          in_valid <= 1; in_data <= img[f][y][x];
          @(posedge clk);
        end
      in_valid <= 0;
      if (f == 0) repeat (3 * W) @(posedge clk);
    end
    repeat (3 * W) @(posedge clk);
    checks++;
    if (n_frame[0] != W * H) begin failures++; $display("FAIL frame 0 windows %0d", n_frame[0]); end
    checks++;
    if (n_frame[1] >= W * H) begin failures++; $display("FAIL frame 1 not cut by clear"); end
    checks++;
    if (n_frame[2] != FW[2] * FH[2]) begin failures++; $display("FAIL frame 2 windows %0d", n_frame[2]); end
    checks++;
    if (first_out - first_in != C * W + C + 1) begin
      failures++; $display("FAIL latency %0d", first_out - first_in);
    end
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
