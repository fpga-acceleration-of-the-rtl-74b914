// tb_hs_pyramid_full: end-to-end test of the multi-scale H&S pipeline with
// every parameter at its default: 1024 x 1024 frames, 3 levels, 20/10/5
// iterations, 10 cores, bi-cubic warping (level 2 makes two passes through
// the pass RAM, levels 1 and 0 are fully pipelined).
//  Frame pair 1: I2 == I1 (textured): every output velocity must be exactly 0.
//  Frame pair 2: a smooth pattern translated by (+1, 0) pixel: the mean
//                velocity over the interior must be near (1, 0).
// It also checks that every output pixel appears once in raster order, that a
// run ends within the cycle budget of its passes, and that the pyramid
// build, RAM passes, fully pipelined passes and coarse-level up-scaling each
// occurred.
module tb_hs_pyramid_full;
  import hs_pkg::*;

  localparam int unsigned W = 1024, H = 1024, NC = 10, NL = 3, RANGE = 7;
  localparam int unsigned ITERS [NL] = '{5, 10, 20};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, done, pass_ram;
  pix_t       in_i1, in_i2;
  logic [10:0] out_x, out_y;
  flow_t      out_flow;
  logic [2:0] phase, level;
  logic [3:0] n_active;

  hs_pyramid_top dut (
    .clk, .rst, .in_valid, .in_ready, .in_i1, .in_i2,
    .out_valid, .out_x, .out_y, .out_flow, .done,
    .phase, .level, .n_active, .pass_ram);

  int checks = 0, failures = 0;
  int n_down = 0, n_ram_pass = 0, n_full_pass = 0, n_up = 0;

  // mechanism counters: count the first clock of each pass
  logic [2:0] phase_q;
  always_ff @(posedge clk) begin
    phase_q <= phase;
    if (phase == 3'd2 && phase_q != 3'd2) n_down++;
    if (phase == 3'd4 && phase_q != 3'd4) begin
      if (pass_ram) n_ram_pass++; else n_full_pass++;
      if (level < NL - 1 && !pass_ram) n_up++;
    end
  end

  // output collection
  int    n_out, exp_x, exp_y, order_err;
  real   sum_u, sum_v;
  int    n_int, nonzero;
  always_ff @(posedge clk) begin
    if (out_valid) begin
      if (out_x != exp_x || out_y != exp_y) order_err++;
      if (exp_x == W - 1) begin exp_x = 0; exp_y++; end else exp_x++;
      n_out++;
      if (out_flow.u != 0 || out_flow.v != 0) nonzero++;
      if (out_x >= 8 && out_x < W - 8 && out_y >= 8 && out_y < H - 8) begin
        sum_u += real'(out_flow.u) / 256.0;
        sum_v += real'(out_flow.v) / 256.0;
        n_int++;
      end
    end
  end

  function automatic int unsigned pattern(input int x, input int y);
    real p;
    p = 128.0 + 50.0 * $sin(6.2831853 * x / 16.0) * $cos(6.2831853 * y / 20.0)
        + 30.0 * $sin(6.2831853 * (x + y) / 24.0);
    return int'(p);
  endfunction

  // upper bound on the clocks of one run
  function automatic longint budget();
    longint b = 0;
    for (int l = 0; l < NL; l++) begin
      int w = W >> l, n = (W >> l) * (H >> l), r = ITERS[l], ncs;
      if (l < NL - 1) b += n + 2 * w + 20;        // pyramid build
      while (r > 0) begin
        ncs = (r > NC) ? NC : r;
        b += n + (RANGE + 3) * w + 10 + (w + 4) + ncs * (w + 45) + 10;
        r -= ncs;
      end
    end
    return b + W * H;
  endfunction

  task automatic run_frame(input int mode, output longint cycles);
    longint c0;
    n_out = 0; exp_x = 0; exp_y = 0; order_err = 0;
    sum_u = 0; sum_v = 0; n_int = 0; nonzero = 0;
    rst = 1;
    repeat (3) @(posedge clk);
    rst <= 0;
    c0 = 0;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        in_valid <= 1;
        if (mode == 0) begin
          pix_t r;
          r = pix_t'($urandom_range(0, 255));
          in_i1 <= r;
          in_i2 <= r;
        end else begin
          in_i1 <= pix_t'(pattern(x, y));
          in_i2 <= pix_t'(pattern(x - 1, y));
        end
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
    in_valid <= 0;
    while (!done) begin
      @(posedge clk);
      c0++;
    end
    @(posedge clk);
    cycles = c0;
  endtask

  initial begin
    longint cyc;
    in_valid = 0; in_i1 = 0; in_i2 = 0;
    // ---- pair 1: no motion ----
    run_frame(0, cyc);
    checks++; if (n_out != W * H) begin failures++; $display("FAIL pair1 outputs %0d", n_out); end
    checks++; if (order_err != 0) begin failures++; $display("FAIL pair1 order errors %0d", order_err); end
    checks++; if (nonzero != 0) begin failures++; $display("FAIL pair1 nonzero velocities %0d", nonzero); end
    checks++; if (cyc > budget()) begin failures++; $display("FAIL pair1 cycles %0d > %0d", cyc, budget()); end
    $display("pair1: %0d outputs, %0d cycles (budget %0d)", n_out, cyc, budget());
    // ---- pair 2: translation by (+1, 0) ----
    run_frame(1, cyc);
    $display("pair2: mean u=%f v=%f over %0d pixels, %0d cycles", sum_u / n_int, sum_v / n_int, n_int, cyc);
    checks++; if (n_out != W * H) begin failures++; $display("FAIL pair2 outputs %0d", n_out); end
    checks++; if (order_err != 0) begin failures++; $display("FAIL pair2 order"); end
    checks++; if (sum_u / n_int < 0.7 || sum_u / n_int > 1.3) begin failures++; $display("FAIL pair2 mean u"); end
    checks++; if (sum_v / n_int < -0.3 || sum_v / n_int > 0.3) begin failures++; $display("FAIL pair2 mean v"); end
    // ---- mechanisms ----
    $display("mechanisms: down=%0d ram_pass=%0d full_pass=%0d upscaled=%0d", n_down, n_ram_pass, n_full_pass, n_up);
    checks++; if (n_down == 0) begin failures++; $display("FAIL no pyramid build"); end
    checks++; if (n_ram_pass == 0) begin failures++; $display("FAIL no RAM pass"); end
    checks++; if (n_full_pass == 0) begin failures++; $display("FAIL no fully pipelined pass"); end
    checks++; if (n_up == 0) begin failures++; $display("FAIL no up-scaled level"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
