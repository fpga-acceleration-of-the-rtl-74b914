// upscale: x2 up-scaling of the coarser level's velocity field.
//
// For a pixel (x, y) of level L it reads the velocity stored for (x/2, y/2)
// of level L+1 (nearest neighbour, clamped to the coarse size) and doubles
// it, since one coarse pixel spans two fine ones.  At the coarsest level
// (has_coarse low) the result is zero.  The read goes to a frame_mem port:
// rd_addr is presented in the clock of req_valid, and out_flow is valid one
// clock later.  Doubling follows the original design; nearest-neighbour
// interpolation is this design's choice (the method is not specified).
module upscale
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
  input  logic          req_valid,
  input  logic [WW-1:0] x,
  input  logic [HW-1:0] y,
  output logic [AW-1:0] rd_addr,
  input  flow_t         rd_data,
  output logic          out_valid,
  output flow_t         out_flow
);

  logic [WW-1:0] cxq;
  logic [HW-1:0] cyq;
  logic          has_q;

  always_comb begin
    cxq = x >> 1;
    cyq = y >> 1;
    if (cxq > coarse_width - 1'b1)  cxq = coarse_width - 1'b1;
    if (cyq > coarse_height - 1'b1) cyq = coarse_height - 1'b1;
    rd_addr = coarse_base + AW'(cyq) * AW'(coarse_width) + AW'(cxq);
  end

  always_ff @(posedge clk) begin
    out_valid <= rst ? 1'b0 : req_valid;
    has_q     <= has_coarse;
  end

  always_comb begin
    if (has_q) begin
      out_flow.u = sat_vel(48'(rd_data.u) <<< 1);
      out_flow.v = sat_vel(48'(rd_data.v) <<< 1);
    end else begin
      out_flow = '0;
    end
  end

endmodule
