// tb_sum_upscale: a 5 x 3 coarse velocity field (held in a frame_mem) is
// up-scaled for a 10 x 6 fine frame and added to random increments.  Each
// output must be 2 * coarse(x/2, y/2) + d, saturated, one clock after its
// input; with has_coarse low it must be d alone.  Values near the limits
// exercise the saturation.
module tb_sum_upscale;
  import hs_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 10, H = 6, CW = 5, CH = 3, BASE = 7;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic       has_coarse = 1, in_valid = 0, out_valid;
  logic [4:0] x = 0, out_x;
  logic [3:0] y = 0, out_y;
  flow_t      in_d = '0, out_flow;
  logic [7:0] rd_addr;
  logic [31:0] rdata [1];
  logic [7:0] raddr [1];
  logic       we = 0;
  logic [7:0] waddr = 0;
  logic [31:0] wdata = 0;

  frame_mem #(.DW(32), .DEPTH(256), .NRD(1)) u_mem (
    .clk, .we, .waddr, .wdata, .raddr, .rdata);
  assign raddr[0] = rd_addr;

  sum_upscale #(.W_MAX(16), .H_MAX(8), .AW(8)) dut (
    .clk, .rst, .has_coarse, .coarse_base(8'(BASE)), .coarse_width(5'(CW)), .coarse_height(4'(CH)),
    .in_valid, .x, .y, .in_d, .rd_addr, .rd_data(flow_t'(rdata[0])),
    .out_valid, .out_x, .out_y, .out_flow);

  int checks = 0, failures = 0;
  int cu [CH][CW], cv [CH][CW];
  int du [H][W], dv [H][W];
  int n_out = 0, pass = 0;

  always_ff @(posedge clk) begin
    if (out_valid && !rst) begin
      int px, py;
      longint eu, ev;
      px = n_out % W; py = n_out / W;
      eu = satv((pass == 0 ? satv(2 * cu[py / 2][px / 2]) : 0) + du[py][px]);
      ev = satv((pass == 0 ? satv(2 * cv[py / 2][px / 2]) : 0) + dv[py][px]);
      checks++;
      if (out_x != px || out_y != py || longint'(out_flow.u) != eu || longint'(out_flow.v) != ev) begin
        failures++;
        $display("FAIL p%0d (%0d,%0d) got %0d,%0d want %0d,%0d", pass, px, py, out_flow.u, out_flow.v, eu, ev);
      end
      n_out <= n_out + 1;
    end
  end

  initial begin
    for (int j = 0; j < CH; j++)
      for (int i = 0; i < CW; i++) begin
        cu[j][i] = $signed($urandom_range(0, 65535)) - 32768;
        cv[j][i] = $signed($urandom_range(0, 2000)) - 1000;
      end
    for (int j = 0; j < H; j++)
      for (int i = 0; i < W; i++) begin
        du[j][i] = $signed($urandom_range(0, 2000)) - 1000;
        dv[j][i] = $signed($urandom_range(0, 65535)) - 32768;
      end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int j = 0; j < CH; j++)
      for (int i = 0; i < CW; i++) begin
        we <= 1; waddr <= 8'(BASE + j * CW + i);
        wdata <= {16'(cu[j][i]), 16'(cv[j][i])};
        @(posedge clk);
      end
    we <= 0;
    for (pass = 0; pass < 2; pass++) begin
      has_coarse <= (pass == 0);
      n_out = 0;
      for (int j = 0; j < H; j++)
        for (int i = 0; i < W; i++) begin
          in_valid <= 1; x <= 5'(i); y <= 4'(j);
          in_d <= '{u: vel_t'(du[j][i]), v: vel_t'(dv[j][i])};
          @(posedge clk);
          checks++;
          if ((j + i > 0) != out_valid) begin failures++; $display("FAIL latency at %0d,%0d", i, j); end
        end
      in_valid <= 0;
      repeat (3) @(posedge clk);
      checks++;
      if (n_out != W * H) begin failures++; $display("FAIL count %0d", n_out); end
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
