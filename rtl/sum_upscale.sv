// sum_upscale: the "sum, up-scaling" core at the end of a level.
//
// For each pixel (x, y) leaving the H&S cores with its increment (du, dv) it
// fetches the up-scaled initial velocity of that pixel (2 x the coarser
// level's final velocity, through an upscale instance and a frame_mem read
// port) and outputs the final velocity of the level,
//   (u, v)_final = 2 * upscale((u, v)_final of level L+1) + (du, dv),
// saturated to the velocity format.  The result is what the next, finer level
// up-scales in turn.  Latency: 1 clock.  Function per the original design;
// the re-read of the initial velocity at the end of the level (rather than
// carrying it through the cores) is this design's choice.
module sum_upscale
  import hs_pkg::*;
#(
  parameter int unsigned W_MAX = 1024,
  parameter int unsigned H_MAX = 1024,
  parameter int unsigned AW    = 20,
  localparam int unsigned WW   = $clog2(W_MAX + 1),
  localparam int unsigned HW   = $clog2(H_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          has_coarse,
  input  logic [AW-1:0] coarse_base,
  input  logic [WW-1:0] coarse_width,
  input  logic [HW-1:0] coarse_height,
  input  logic          in_valid,
  input  logic [WW-1:0] x,
  input  logic [HW-1:0] y,
  input  flow_t         in_d,
  output logic [AW-1:0] rd_addr,
  input  flow_t         rd_data,
  output logic          out_valid,
  output logic [WW-1:0] out_x,
  output logic [HW-1:0] out_y,
  output flow_t         out_flow
);

  logic  up_valid;
  flow_t up_flow;
  flow_t d_q;

  upscale #(.W_MAX(W_MAX), .H_MAX(H_MAX), .AW(AW)) u_up (
    .clk, .rst, .has_coarse, .coarse_base, .coarse_width, .coarse_height,
    .req_valid(in_valid), .x, .y,
    .rd_addr, .rd_data,
    .out_valid(up_valid), .out_flow(up_flow)
  );

  always_ff @(posedge clk) begin
    d_q   <= in_d;
    out_x <= x;
    out_y <= y;
  end

  assign out_valid  = up_valid;
  assign out_flow.u = sat_vel(48'(up_flow.u) + 48'(d_q.u));
  assign out_flow.v = sat_vel(48'(up_flow.v) + 48'(d_q.v));

endmodule
