// stream_window: line buffers plus a KxK register window over a raster
// pixel stream, with clamp-to-edge border handling.
//
// The stream arrives one pixel per clock in raster order, one frame of
// width x height pixels without gaps; in_valid marks the frame's pixels and is
// low before and after it.  The window advances on every clock, so after the
// last pixel the caller keeps clocking (in_valid low) until the centre has
// left the frame.  K-1 line buffers, each a circular array whose pointer wraps
// at the run-time width, delay the stream by one row each; every tap feeds a
// K-stage shift register, giving the KxK window.
//
// Outputs are combinational from the registers: c_valid marks a window whose
// centre is a frame pixel at (cx, cy); win[dy][dx] holds the pixel at
// (cx+dx-K/2, cy+dy-K/2), clamped into the frame.  Centre latency is
// (K/2)*width + K/2 + 1 clocks.  clear (synchronous) restarts the position
// counters and the line-buffer pointer, drops whatever is left of the previous
// frame, and must be pulsed before a frame whose width differs from the
// previous one.  After reset or clear, line-buffer
// cells are only trusted once they have been written, so no initialisation
// of the buffers is needed.
//
// Line buffers feeding rows of window registers follow the architecture of
// the original design; clamping at the borders is this design's choice.
module stream_window #(
  parameter int unsigned DW    = 8,
  parameter int unsigned K     = 3,
  parameter int unsigned W_MAX = 1024,
  parameter int unsigned H_MAX = 1024,
  localparam int unsigned WW   = $clog2(W_MAX + 1),
  localparam int unsigned HW   = $clog2(H_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic [WW-1:0] width,
  input  logic [HW-1:0] height,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic          c_valid,
  output logic [WW-1:0] cx,
  output logic [HW-1:0] cy,
  output logic [DW-1:0] win [K][K]
);

  localparam int C  = K / 2;
  localparam int LW = (W_MAX > 1) ? $clog2(W_MAX) : 1;
  typedef logic [DW:0] ent_t;   // {valid, data}

  ent_t          lb [K-1][W_MAX];
  ent_t          tap [K];
  ent_t          sr  [K][K];
  logic [WW-1:0] ptr;
  int unsigned   wraps;    // rows clocked since reset or clear, saturating

  // Taps: tap[r] is the stream delayed by r rows.  Until r rows have been
  // clocked since reset or clear, tap r reads cells not yet written in this
  // frame, so its valid bit is masked.
  always_comb begin
    tap[0] = {in_valid, in_data};
    for (int r = 1; r < K; r++) begin
      tap[r] = lb[r-1][LW'(ptr)];
      if (wraps < r) tap[r][DW] = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ptr   <= '0;
      wraps <= 0;
    end else if (ptr == width - 1'b1) begin
      ptr   <= '0;
      if (wraps < K - 1) wraps <= wraps + 1;
    end else begin
      ptr <= ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    for (int r = 1; r < K; r++) lb[r-1][LW'(ptr)] <= tap[r-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < K; r++)
        for (int j = 0; j < K; j++) sr[r][j] <= '0;
    end else begin
      for (int r = 0; r < K; r++) begin
        sr[r][0] <= tap[r];
        for (int j = 1; j < K; j++) sr[r][j] <= sr[r][j-1];
      end
      // clear drops pixels of the previous frame still in the window
      if (clear)
        for (int r = 0; r < K; r++)
          for (int j = 0; j < K; j++) sr[r][j][DW] <= 1'b0;
    end
  end

  assign c_valid = sr[K-1-C][K-1-C][DW];

  // Centre position.
  always_ff @(posedge clk) begin
    if (rst || clear) begin
      cx <= '0;
      cy <= '0;
    end else if (c_valid) begin
      if (cx == width - 1'b1) begin
        cx <= '0;
        cy <= (cy == height - 1'b1) ? '0 : cy + 1'b1;
      end else begin
        cx <= cx + 1'b1;
      end
    end
  end

  // Clamped window.  sr[r][j] holds the pixel at (dx = C - j, dy = C - r).
  always_comb begin
    for (int dy = 0; dy < K; dy++) begin
      for (int dx = 0; dx < K; dx++) begin
        int ex, ey;
        ex = int'(cx) + dx - C;
        ey = int'(cy) + dy - C;
        if (ex < 0) ex = 0;
        if (ex > int'(width) - 1) ex = int'(width) - 1;
        if (ey < 0) ey = 0;
        if (ey > int'(height) - 1) ey = int'(height) - 1;
        win[dy][dx] = sr[C - (ey - int'(cy))][C - (ex - int'(cx))][DW-1:0];
      end
    end
  end

endmodule
