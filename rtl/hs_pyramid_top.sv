// hs_pyramid_top: multi-scale (pyramidal) Horn and Schunck optical flow.
//
// Two frames I1, I2 of W x H 8-bit pixels stream in (one pixel pair per
// clock while in_ready).  The design then
//   1. builds a NLEVELS-level image pyramid with gauss_down (5x5 Gaussian,
//      factor 2 per level) for both frames; level 1 is filtered from the
//      input stream while it is being stored, deeper levels by reading back;
//   2. processes the levels coarse to fine.  For level L it streams the frame
//      once through: upscale (2 x the velocity of level L+1, zero at the
//      coarsest level) -> warp_core (I2 moved by that velocity) -> hs_grad
//      (Ix, Iy, It) -> hs_chain (ITERS[L] H&S iterations on the increment
//      du, dv).  When ITERS[L] exceeds the NCORES cores, the records go to a
//      frame RAM and the frame makes further passes through the chain
//      (partial-iterative mode; with NCORES = 1 the standard iterative mode).
//      On the last pass sum_upscale adds the increment to the up-scaled
//      velocity; the result is stored for the next level or, at level 0,
//      sent out;
//   3. emits the level-0 velocity field as a raster stream (out_valid, out_x,
//      out_y, out_flow, velocities in 8.8 signed fixed point) and pulses done.
//
// Every streaming unit advances one pixel per clock; a pass lasts the frame
// plus the pipeline's fill time.  phase/level/n_active/pass_ram report the
// controller state.  Frames, pyramid levels, velocities and pass records are
// held in frame_mem arrays (the original system kept frames in external
// memory).
//
// Follows the original design: pyramid of 3 levels with factor 2, 20/10/5
// iterations at levels 2/1/0, 10 H&S cores, bi-cubic warping, the
// warp/grad/H&S/sum order, up-scaling by 2 and the RAM loop of the iterative
// modes.  This design's own choices: fixed-point arithmetic in place of
// floating point, a single pixel-per-clock chain (the parallel F_pi mode that
// splits a level over several chains is not built), the stream interface and
// the pass controller.
module hs_pyramid_top
  import hs_pkg::*;
#(
  parameter int unsigned W       = 1024,
  parameter int unsigned H       = 1024,
  parameter int unsigned NLEVELS = 3,
  parameter int unsigned ITERS [NLEVELS] = '{5, 10, 20},   // index = level
  parameter int unsigned NCORES  = 10,
  parameter int unsigned RANGE   = 7,
  parameter interp_e     INTERP  = INTERP_BICUBIC,
  parameter int unsigned ALPHA2  = 64,
  localparam int unsigned WW     = $clog2(W + 1),
  localparam int unsigned HW     = $clog2(H + 1),
  localparam int unsigned NAW    = $clog2(NCORES + 1),
  localparam int unsigned PYR_D  = level_base(W, H, NLEVELS),
  localparam int unsigned VEL_D  = (NLEVELS > 1) ? PYR_D - W * H : 1,
  localparam int unsigned CRS_D  = (NLEVELS > 1) ? PYR_D - W * H : 1,
  localparam int unsigned PAW    = $clog2(W * H),
  localparam int unsigned CAW    = (CRS_D > 1) ? $clog2(CRS_D) : 1,
  localparam int unsigned VAW    = (VEL_D > 1) ? $clog2(VEL_D) : 1,
  localparam int unsigned RAW    = $clog2(W * H)
) (
  input  logic           clk,
  input  logic           rst,
  // input frames
  input  logic           in_valid,
  output logic           in_ready,
  input  pix_t           in_i1,
  input  pix_t           in_i2,
  // level-0 velocity field
  output logic           out_valid,
  output logic [WW-1:0]  out_x,
  output logic [HW-1:0]  out_y,
  output flow_t          out_flow,
  output logic           done,
  // status
  output logic [2:0]     phase,
  output logic [2:0]     level,
  output logic [NAW-1:0] n_active,
  output logic           pass_ram
);

  typedef enum logic [2:0] {
    S_LOAD = 3'd0, S_DOWN_PREP = 3'd1, S_DOWN = 3'd2,
    S_LVL_PREP = 3'd3, S_LVL = 3'd4, S_DONE = 3'd5
  } state_e;

  state_e        state;
  logic [2:0]    lvl;
  logic [WW-1:0] cur_w;
  logic [HW-1:0] cur_h;
  logic [31:0]   cur_n, t, sink_n, look;
  logic [31:0]   rem;          // iterations still to do at this level
  logic          first_pass;
  logic [NAW-1:0] n_act;
  logic          to_ram;       // this pass ends in the pass RAM
  logic          clr;

  assign in_ready = (state == S_LOAD);
  assign phase    = state;
  assign level    = lvl;
  assign n_active = n_act;
  assign pass_ram = to_ram;
  assign clr      = (state == S_DOWN_PREP) || (state == S_LVL_PREP);

  function automatic logic [31:0] pbase(input logic [2:0] l);
    return level_base(W, H, int'(l));
  endfunction
  function automatic logic [31:0] cbase(input logic [2:0] l);
    return level_base(W, H, int'(l)) - W * H;
  endfunction
  function automatic logic [31:0] vbase(input logic [2:0] l);
    return level_base(W, H, int'(l)) - W * H;
  endfunction

  // ================= memories =================
  // Level 0 of both frames, written while loading.
  logic            f0_we;
  logic [PAW-1:0]  f0_raddr1 [1], f0_raddr2 [1];
  pix_t            f0_rdata1 [1], f0_rdata2 [1];

  frame_mem #(.DW(PIX_W), .DEPTH(W * H), .NRD(1)) u_f0_i1 (
    .clk, .we(f0_we), .waddr(PAW'(t)), .wdata(in_i1),
    .raddr(f0_raddr1), .rdata(f0_rdata1));
  frame_mem #(.DW(PIX_W), .DEPTH(W * H), .NRD(1)) u_f0_i2 (
    .clk, .we(f0_we), .waddr(PAW'(t)), .wdata(in_i2),
    .raddr(f0_raddr2), .rdata(f0_rdata2));

  // Coarser levels 1 .. NLEVELS-1 of both frames, written by gauss_down.
  logic            crs_we;
  logic [CAW-1:0]  crs_waddr;
  logic [CAW-1:0]  crs_raddr1 [1], crs_raddr2 [1];
  pix_t            crs_rdata1 [1], crs_rdata2 [1];
  pix_t            g_pix1, g_pix2;

  frame_mem #(.DW(PIX_W), .DEPTH(CRS_D), .NRD(1)) u_crs_i1 (
    .clk, .we(crs_we), .waddr(crs_waddr), .wdata(g_pix1),
    .raddr(crs_raddr1), .rdata(crs_rdata1));
  frame_mem #(.DW(PIX_W), .DEPTH(CRS_D), .NRD(1)) u_crs_i2 (
    .clk, .we(crs_we), .waddr(crs_waddr), .wdata(g_pix2),
    .raddr(crs_raddr2), .rdata(crs_rdata2));

  // Read data of the level being processed.
  logic lvl0_q;
  pix_t pyr1_rdata, pyr2_rdata;
  always_ff @(posedge clk) lvl0_q <= (lvl == 0);
  assign pyr1_rdata = lvl0_q ? f0_rdata1[0] : crs_rdata1[0];
  assign pyr2_rdata = lvl0_q ? f0_rdata2[0] : crs_rdata2[0];

  logic            vel_we;
  logic [VAW-1:0]  vel_waddr;
  flow_t           vel_wdata;
  logic [VAW-1:0]  vel_raddr [2];
  logic [$bits(flow_t)-1:0] vel_rdata [2];

  frame_mem #(.DW($bits(flow_t)), .DEPTH(VEL_D), .NRD(2)) u_vel (
    .clk, .we(vel_we), .waddr(vel_waddr), .wdata(vel_wdata),
    .raddr(vel_raddr), .rdata(vel_rdata));

  logic            ram_we;
  logic [RAW-1:0]  ram_waddr;
  hs_rec_t         ram_wdata;
  logic [RAW-1:0]  ram_raddr [1];
  logic [$bits(hs_rec_t)-1:0] ram_rdata [1];

  frame_mem #(.DW($bits(hs_rec_t)), .DEPTH(W * H), .NRD(1)) u_passram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rdata));

  // ================= pyramid creation =================
  logic          src_valid_q;
  logic          g_valid1, g_valid2;
  logic [WW-1:0] g_ox, g_ox2;
  logic [HW-1:0] g_oy, g_oy2;
  logic          g_in_valid;
  pix_t          g_in1, g_in2;

  // Level 1 is built from the input stream while it is loaded; deeper levels
  // are built by reading back the level above.
  assign g_in_valid = (state == S_LOAD) ? (in_valid && in_ready)
                                        : (src_valid_q && state == S_DOWN);
  assign g_in1      = (state == S_LOAD) ? in_i1 : pyr1_rdata;
  assign g_in2      = (state == S_LOAD) ? in_i2 : pyr2_rdata;

  gauss_down #(.W_MAX(W), .H_MAX(H)) u_down1 (
    .clk, .rst, .clear(clr), .width(cur_w), .height(cur_h),
    .in_valid(g_in_valid), .in_pix(g_in1),
    .out_valid(g_valid1), .ox(g_ox), .oy(g_oy), .out_pix(g_pix1));
  gauss_down #(.W_MAX(W), .H_MAX(H)) u_down2 (
    .clk, .rst, .clear(clr), .width(cur_w), .height(cur_h),
    .in_valid(g_in_valid), .in_pix(g_in2),
    .out_valid(g_valid2), .ox(g_ox2), .oy(g_oy2), .out_pix(g_pix2));

  // ================= level front end =================
  logic          main_req;            // pixel n = t - look requested this clock
  logic          main_valid_q;
  logic [WW-1:0] xn;
  logic [HW-1:0] yn;
  logic          i2_valid_q;
  logic          up_valid;
  flow_t         up_flow;
  logic [31:0]   up_addr;
  logic          has_coarse;

  assign has_coarse = (32'(lvl) + 1 < NLEVELS);

  upscale #(.W_MAX(W), .H_MAX(H), .AW(32)) u_up_front (
    .clk, .rst, .has_coarse, .coarse_base(vbase(lvl + 3'd1)),
    .coarse_width(cur_w >> 1), .coarse_height(cur_h >> 1),
    .req_valid(main_req), .x(xn), .y(yn),
    .rd_addr(up_addr), .rd_data(flow_t'(vel_rdata[0])),
    .out_valid(up_valid), .out_flow(up_flow));

  logic        wp_valid;
  inten_pair_t wp_pair;

  warp_core #(.W_MAX(W), .H_MAX(H), .RANGE(RANGE), .INTERP(INTERP)) u_warp (
    .clk, .rst, .clear(clr), .width(cur_w), .height(cur_h),
    .i2_valid(i2_valid_q), .i2_pix(pyr2_rdata),
    .in_valid(main_valid_q), .in_i1(pyr1_rdata), .in_flow(up_flow),
    .out_valid(wp_valid), .out_pair(wp_pair));

  logic    gr_valid;
  hs_rec_t gr_rec;

  hs_grad #(.W_MAX(W), .H_MAX(H)) u_grad (
    .clk, .rst, .clear(clr), .width(cur_w), .height(cur_h),
    .in_valid(wp_valid), .in_pair(wp_pair),
    .out_valid(gr_valid), .out_rec(gr_rec));

  // ================= H&S chain =================
  logic    ram_valid_q;
  logic    ch_in_valid, ch_out_valid;
  hs_rec_t ch_in_rec, ch_out_rec;

  assign ch_in_valid = first_pass ? gr_valid : ram_valid_q;
  assign ch_in_rec   = first_pass ? gr_rec   : hs_rec_t'(ram_rdata[0]);

  hs_chain #(.NCORES(NCORES), .W_MAX(W), .H_MAX(H), .ALPHA2(ALPHA2)) u_chain (
    .clk, .rst, .clear(clr), .width(cur_w), .height(cur_h), .n_active(n_act),
    .in_valid(ch_in_valid && state == S_LVL), .in_rec(ch_in_rec),
    .out_valid(ch_out_valid), .out_rec(ch_out_rec));

  // ================= sink: pass RAM or sum / up-scaling =================
  logic [WW-1:0] xm;
  logic [HW-1:0] ym;
  logic [31:0]   m;
  logic          su_valid;
  logic [WW-1:0] su_x;
  logic [HW-1:0] su_y;
  flow_t         su_flow;
  logic [31:0]   su_addr;

  sum_upscale #(.W_MAX(W), .H_MAX(H), .AW(32)) u_sum (
    .clk, .rst, .has_coarse, .coarse_base(vbase(lvl + 3'd1)),
    .coarse_width(cur_w >> 1), .coarse_height(cur_h >> 1),
    .in_valid(ch_out_valid && !to_ram), .x(xm), .y(ym), .in_d(ch_out_rec.d),
    .rd_addr(su_addr), .rd_data(flow_t'(vel_rdata[1])),
    .out_valid(su_valid), .out_x(su_x), .out_y(su_y), .out_flow(su_flow));

  assign vel_raddr[0] = VAW'(up_addr);
  assign vel_raddr[1] = VAW'(su_addr);
  assign vel_we       = su_valid && (lvl != 0);
  assign vel_waddr    = VAW'(vbase(lvl) + 32'(su_y) * 32'(cur_w) + 32'(su_x));
  assign vel_wdata    = su_flow;

  assign ram_we       = ch_out_valid && to_ram;
  assign ram_waddr    = RAW'(m);
  assign ram_wdata    = ch_out_rec;
  assign ram_raddr[0] = RAW'(t);

  assign out_valid = su_valid && (lvl == 0);
  assign out_x     = su_x;
  assign out_y     = su_y;
  assign out_flow  = su_flow;

  // ================= pyramid memory ports =================
  always_comb begin
    main_req = (state == S_LVL) && first_pass && (t >= look) && (t - look < cur_n);
    f0_we     = (state == S_LOAD) && in_valid;
    crs_we    = (state == S_LOAD || state == S_DOWN) && g_valid1;
    crs_waddr = CAW'(cbase(lvl + 3'd1) + 32'(g_oy) * 32'(cur_w >> 1) + 32'(g_ox));
    if (state == S_LVL) begin
      f0_raddr1[0]  = PAW'(t - look);
      crs_raddr1[0] = CAW'(cbase(lvl) + (t - look));
    end else begin
      f0_raddr1[0]  = PAW'(t);
      crs_raddr1[0] = CAW'(cbase(lvl) + t);
    end
    f0_raddr2[0]  = PAW'(t);
    crs_raddr2[0] = CAW'(cbase(lvl) + t);
  end

  // ================= controller =================
  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_LOAD;
      lvl          <= '0;
      cur_w        <= WW'(W);
      cur_h        <= HW'(H);
      cur_n        <= W * H;
      look         <= '0;
      t            <= '0;
      sink_n       <= '0;
      rem          <= '0;
      first_pass   <= 1'b1;
      n_act        <= '0;
      to_ram       <= 1'b0;
      src_valid_q  <= 1'b0;
      main_valid_q <= 1'b0;
      i2_valid_q   <= 1'b0;
      ram_valid_q  <= 1'b0;
      xn <= '0; yn <= '0; xm <= '0; ym <= '0; m <= '0;
      done         <= 1'b0;
    end else begin
      done         <= 1'b0;
      src_valid_q  <= 1'b0;
      main_valid_q <= 1'b0;
      i2_valid_q   <= 1'b0;
      ram_valid_q  <= 1'b0;
      unique case (state)
        S_LOAD: begin
          if (g_valid1) sink_n <= sink_n + 1;
          if (in_valid) begin
            if (t == W * H - 1) begin
              lvl <= '0;
              if (NLEVELS > 1) begin
                // drain level 1 out of gauss_down; no further reads
                t     <= W * H;
                state <= S_DOWN;
              end else begin
                t          <= '0;
                rem        <= ITERS[0];
                first_pass <= 1'b1;
                state      <= S_LVL_PREP;
              end
            end else begin
              t <= t + 1;
            end
          end
        end

        S_DOWN_PREP: begin
          cur_w  <= WW'(W >> lvl);
          cur_h  <= HW'(H >> lvl);
          cur_n  <= level_pixels(W, H, int'(lvl));
          t      <= '0;
          sink_n <= '0;
          state  <= S_DOWN;
        end

        S_DOWN: begin
          t           <= t + 1;
          src_valid_q <= (t < cur_n);
          if (g_valid1) begin
            sink_n <= sink_n + 1;
            if (sink_n + 1 == level_pixels(W, H, int'(lvl) + 1)) begin
              if (32'(lvl) + 2 < NLEVELS) begin
                lvl   <= lvl + 1'b1;
                state <= S_DOWN_PREP;
              end else begin
                lvl        <= 3'(NLEVELS - 1);
                rem        <= ITERS[NLEVELS-1];
                first_pass <= 1'b1;
                state      <= S_LVL_PREP;
              end
            end
          end
        end

        S_LVL_PREP: begin
          cur_w  <= WW'(W >> lvl);
          cur_h  <= HW'(H >> lvl);
          cur_n  <= level_pixels(W, H, int'(lvl));
          look   <= (RANGE + 3) * (W >> lvl);
          n_act  <= (rem > NCORES) ? NAW'(NCORES) : NAW'(rem);
          to_ram <= (rem > NCORES);
          t      <= '0;
          sink_n <= '0;
          m      <= '0;
          xn <= '0; yn <= '0; xm <= '0; ym <= '0;
          state  <= S_LVL;
        end

        S_LVL: begin
          t <= t + 1;
          // sources
          i2_valid_q   <= first_pass && (t < cur_n);
          main_valid_q <= main_req;
          ram_valid_q  <= !first_pass && (t < cur_n);
          if (main_req) begin
            if (xn == cur_w - 1'b1) begin
              xn <= '0;
              yn <= yn + 1'b1;
            end else begin
              xn <= xn + 1'b1;
            end
          end
          // chain output position
          if (ch_out_valid) begin
            m <= m + 1;
            if (xm == cur_w - 1'b1) begin
              xm <= '0;
              ym <= ym + 1'b1;
            end else begin
              xm <= xm + 1'b1;
            end
          end
          // pass completion
          if ((to_ram && ch_out_valid) || (!to_ram && su_valid)) begin
            sink_n <= sink_n + 1;
            if (sink_n + 1 == cur_n) begin
              if (to_ram) begin
                rem        <= rem - 32'(n_act);
                first_pass <= 1'b0;
                state      <= S_LVL_PREP;
              end else if (lvl != 0) begin
                lvl        <= lvl - 1'b1;
                rem        <= ITERS[lvl - 1'b1];
                first_pass <= 1'b1;
                state      <= S_LVL_PREP;
              end else begin
                done  <= 1'b1;
                state <= S_DONE;
              end
            end
          end
        end

        S_DONE: ;

        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
