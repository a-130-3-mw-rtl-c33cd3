// rop_engine: render output unit with screen-space approximated lighting
// support (Sec. VI, Fig. 17).
//
// Takes one pixel per cycle (px_valid/px_ready) with its screen position,
// 16-bit depth and role. In the shading phase (approx_phase low) the pixel's
// shaded RGBA8 colour goes both into the shaded pixel colour buffer of the
// screen-space reconstruction unit (at its tile-local index) and, through
// the pixel visibility test, to the ROP buffer. In the approximation phase
// (approx_phase high, set by the task dispatcher) the colour is instead the
// approximated colour the reconstruction unit makes from the shaded samples
// (4x4 plane fit, 2x2 average or one-point splat), as selected by the
// approximation phase enable multiplexer of the source's figure; it passes
// the same depth and stencil tests.
// The ROP buffer holds colour, depth and stencil for a SCREEN_W x SCREEN_H
// viewport on chip (the source's colour, depth and stencil caches; keeping a
// whole viewport instead of a cached part of an external framebuffer is this
// design's simplification). clear_start fills it with the clear values, one
// pixel per cycle, while clear_busy is high. rd_addr = y*SCREEN_W + x reads
// colour and depth combinationally. tile_clear empties the shaded colour
// buffer before a tile. Counters give the pixels written by each path.
module rop_engine
  import gpu_pkg::*;
#(
  parameter int unsigned SCREEN_W = 512,
  parameter int unsigned SCREEN_H = 512,
  localparam int unsigned NPIX = SCREEN_W * SCREEN_H,
  localparam int unsigned PAW  = $clog2(NPIX)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            depth_en,
  input  logic            stencil_en,
  input  logic [7:0]      stencil_ref,
  input  logic [31:0]     clear_color,
  input  logic [15:0]     clear_depth,
  input  logic [7:0]      clear_stencil,
  input  logic            clear_start,
  output logic            clear_busy,
  input  logic            tile_clear,
  input  logic            approx_phase,
  input  logic            px_valid,
  output logic            px_ready,
  input  logic [15:0]     px_x,
  input  logic [15:0]     px_y,
  input  logic [15:0]     px_depth,
  input  logic [31:0]     px_color,
  input  pix_role_e       px_role,
  input  logic [PAW-1:0]  rd_addr,
  output logic [31:0]     rd_color,
  output logic [15:0]     rd_depth,
  output logic [31:0]     n_shaded,
  output logic [31:0]     n_plane,
  output logic [31:0]     n_avg,
  output logic [31:0]     n_splat,
  output logic [31:0]     n_hidden,
  output logic [31:0]     n_missing
);
  logic [31:0] color_cache   [NPIX];
  logic [15:0] depth_cache   [NPIX];
  logic [7:0]  stencil_cache [NPIX];

  logic [PAW-1:0] clr_addr, addr;
  logic [4:0]     tidx;
  logic [31:0]    a_color, wcolor;
  logic           a_ok, c_upd, z_upd, fire;

  assign px_ready = !clear_busy;
  assign fire     = px_valid && px_ready;
  assign addr     = PAW'(32'(px_y) * SCREEN_W + 32'(px_x));
  assign tidx     = {px_y[1:0], px_x[2:0]};
  assign rd_color = color_cache[rd_addr];
  assign rd_depth = depth_cache[rd_addr];

  ssal_reconstruction u_recon (
    .clk, .rst_n, .tile_clear,
    .wr_en(fire && !approx_phase), .wr_idx(tidx), .wr_color(px_color),
    .q_idx(tidx), .q_role(px_role), .q_color(a_color), .q_ok(a_ok));

  // approximation phase enable multiplexer
  assign wcolor = approx_phase ? a_color : px_color;

  pixel_visibility_test u_vis (
    .depth_en, .stencil_en, .stencil_ref,
    .new_depth(px_depth), .old_depth(depth_cache[addr]), .old_stencil(stencil_cache[addr]),
    .color_update(c_upd), .depth_update(z_upd));

  always_ff @(posedge clk) begin
    if (clear_busy) begin
      color_cache[clr_addr]   <= clear_color;
      depth_cache[clr_addr]   <= clear_depth;
      stencil_cache[clr_addr] <= clear_stencil;
    end else if (fire) begin
      if (c_upd) color_cache[addr] <= wcolor;
      if (z_upd) depth_cache[addr] <= px_depth;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clear_busy <= 1'b0; clr_addr <= '0;
      n_shaded <= '0; n_plane <= '0; n_avg <= '0; n_splat <= '0; n_hidden <= '0; n_missing <= '0;
    end else begin
      if (clear_busy) begin
        clr_addr <= clr_addr + 1'b1;
        if (int'(clr_addr) == NPIX - 1) clear_busy <= 1'b0;
      end else if (clear_start) begin
        clear_busy <= 1'b1;
        clr_addr   <= '0;
      end
      if (fire) begin
        if (!c_upd) n_hidden <= n_hidden + 1;
        if (!approx_phase) n_shaded <= n_shaded + 1;
        else begin
          if (!a_ok) n_missing <= n_missing + 1;
          unique case (px_role)
            PR_PLANE: n_plane <= n_plane + 1;
            PR_AVG2:  n_avg   <= n_avg + 1;
            PR_SPLAT: n_splat <= n_splat + 1;
            default: ;
          endcase
        end
      end
    end
  end

  a_approx_samples: assert property (@(posedge clk) disable iff (!rst_n) (fire && approx_phase) |-> a_ok);
endmodule
