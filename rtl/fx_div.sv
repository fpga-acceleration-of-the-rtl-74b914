// fx_div: fully pipelined unsigned restoring divider.
//
// Computes quo = num / den (integer quotient) with one quotient bit resolved
// per pipeline stage, so a new division can start on every clock.  A sideband
// word (side_in) and a valid bit travel with each division and leave with its
// quotient.  Latency is NW clocks from in_valid to out_valid.  Division by
// zero returns all ones.  The divider is this design's own choice; the
// original work used generated floating-point operators.
module fx_div #(
  parameter int unsigned NW = 38,  // numerator / quotient width
  parameter int unsigned DW = 32,  // denominator width
  parameter int unsigned SW = 1    // sideband width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  input  logic [SW-1:0] side_in,
  output logic          out_valid,
  output logic [NW-1:0] quo,
  output logic [SW-1:0] side_out
);

  // Stage s holds the partial remainder, the numerator bits not yet used
  // (shifted into place) and the quotient bits found so far.
  logic          v_q  [NW+1];
  logic [DW:0]   rem_q[NW+1];
  logic [NW-1:0] n_q  [NW+1];
  logic [NW-1:0] q_q  [NW+1];
  logic [DW-1:0] d_q  [NW+1];
  logic [SW-1:0] s_q  [NW+1];

  always_comb begin
    v_q[0]   = in_valid;
    rem_q[0] = '0;
    n_q[0]   = num;
    q_q[0]   = '0;
    d_q[0]   = den;
    s_q[0]   = side_in;
  end

  for (genvar s = 0; s < NW; s++) begin : g_stage
    logic [DW:0] trial;
    logic        ge;
    always_comb begin
      trial = {rem_q[s][DW-1:0], n_q[s][NW-1]};
      ge    = (trial >= {1'b0, d_q[s]});
    end
    always_ff @(posedge clk) begin
      if (rst) v_q[s+1] <= 1'b0;
      else     v_q[s+1] <= v_q[s];
      rem_q[s+1] <= ge ? trial - {1'b0, d_q[s]} : trial;
      n_q[s+1]   <= n_q[s] << 1;
      q_q[s+1]   <= {q_q[s][NW-2:0], ge};
      d_q[s+1]   <= d_q[s];
      s_q[s+1]   <= s_q[s];
    end
  end

  assign out_valid = v_q[NW];
  assign quo       = q_q[NW];
  assign side_out  = s_q[NW];

endmodule
