// hs_chain: NCORES Horn and Schunck iteration cores in series.
//
// Each core performs one iteration on the streamed frame, so a frame that
// passes the first n_active cores has had n_active iterations; the output is
// taken after core n_active (1..NCORES).  The chain forms the design's
// iteration modes together with the pass controller in the top:
//   standard iterative (I):  NCORES = 1, one pass per iteration through RAM
//   partial iterative (P^q): all NCORES cores, q passes through RAM
//   fully pipelined (F):     iterations <= NCORES, one pass
// Cores beyond n_active still run but their output is ignored.
// Latency: n_active * hs_core latency.  The modes are the original design's;
// the selectable tap is this design's way of sharing one chain between levels
// with different iteration counts.  The parallel mode (several chains, more
// than one pixel per clock) is not part of this module.
module hs_chain
  import hs_pkg::*;
#(
  parameter int unsigned NCORES = 10,
  parameter int unsigned W_MAX  = 1024,
  parameter int unsigned H_MAX  = 1024,
  parameter int unsigned ALPHA2 = 64,
  localparam int unsigned WW    = $clog2(W_MAX + 1),
  localparam int unsigned HW    = $clog2(H_MAX + 1),
  localparam int unsigned NAW   = $clog2(NCORES + 1)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           clear,
  input  logic [WW-1:0]  width,
  input  logic [HW-1:0]  height,
  input  logic [NAW-1:0] n_active,
  input  logic           in_valid,
  input  hs_rec_t        in_rec,
  output logic           out_valid,
  output hs_rec_t        out_rec
);

  logic    v [NCORES+1];
  hs_rec_t r [NCORES+1];

  assign v[0] = in_valid;
  assign r[0] = in_rec;

  for (genvar k = 0; k < NCORES; k++) begin : g_core
    hs_core #(.W_MAX(W_MAX), .H_MAX(H_MAX), .ALPHA2(ALPHA2)) u_core (
      .clk, .rst, .clear, .width, .height,
      .in_valid(v[k]), .in_rec(r[k]),
      .out_valid(v[k+1]), .out_rec(r[k+1])
    );
  end

  always_comb begin
    out_valid = 1'b0;
    out_rec   = r[NCORES];
    for (int k = 1; k <= NCORES; k++)
      if (NAW'(k) == n_active) begin
        out_valid = v[k];
        out_rec   = r[k];
      end
  end

endmodule
