// gpu_top: 16-core mobile GPU with power-aware pixel approximation.
//
// Four shader clusters of four unified shader cores each; cluster 3 is built
// from approximated precision shader (APS) cores. Each cluster has a texture
// unit with approximated texturing (AT: LOD bias buffer) and a texture L1
// cache; a shared 64 KB texture L2 cache and the data fetch unit connect to
// the external bus. The task dispatcher fetches vertices, runs vertex
// threads, hands triangles to the tile-based raster, schedules the pixel
// threads the raster's screen-space subdivision test selects and drives the
// ROP engine, whose screen-space reconstruction unit fills in the pixels that
// screen-space approximated lighting (SSAL) left unshaded.
//
// Host interface (plain signals):
//  * prog_*/const_*: program and constants, broadcast to all 16 cores.
//  * bias_*: LOD bias map words, broadcast to the four LOD bias buffers.
//  * configuration: ssal_en, at_en, texture base/size, vertex and pixel
//    program start PCs, vertex buffer base (word address), depth/stencil
//    test settings, clear values; clear_start clears the ROP buffer.
//  * tri_valid/tri_ready/tri_idx: one triangle as three vertex indices; idle
//    is high when the previous triangle is completely drawn.
//  * ext_*: external memory bus, 32-bit words, one outstanding read.
//  * fb_rd_addr -> fb_rd_color/fb_rd_depth: read the ROP buffer.
//  * stat_*: event counters.
// Which blocks exist and how they connect follows the source's architecture
// overview; interfaces, formats and sizes not given there are this design's.
module gpu_top
  import gpu_pkg::*;
#(
  parameter int unsigned SCREEN_W = 512,
  parameter int unsigned SCREEN_H = 512,
  parameter int unsigned TEX_LOG2 = 8,
  parameter int unsigned L1_LINES = 256,
  parameter int unsigned L2_LINES = 4096,
  parameter int unsigned NTASK    = 32,
  localparam int unsigned NCL     = 4,
  localparam int unsigned NCPC    = 4,
  localparam int unsigned NCORE   = NCL * NCPC,
  localparam int unsigned NVAR    = 2,
  localparam int unsigned NS      = 1 + 4 * NVAR,
  localparam int unsigned PAW     = $clog2(SCREEN_W * SCREEN_H),
  localparam int unsigned BWAW    = $clog2(((((1 << (2*TEX_LOG2 + 2)) - 1) / 3) + 15) / 16)
) (
  input  logic            clk,
  input  logic            rst_n,
  // loads
  input  logic            prog_we,
  input  logic [7:0]      prog_addr,
  input  instr_t          prog_data,
  input  logic            const_we,
  input  logic [3:0]      const_addr,
  input  vec4_t           const_data,
  input  logic            bias_we,
  input  logic [BWAW-1:0] bias_waddr,
  input  logic [31:0]     bias_wdata,
  input  logic            tex_flush,
  // configuration
  input  logic            ssal_en,
  input  logic            at_en,
  input  logic [31:0]     tex_base,
  input  logic [3:0]      tex_log2,
  input  logic [7:0]      vs_pc,
  input  logic [7:0]      ps_pc,
  input  logic [31:0]     vbase,
  input  logic            depth_en,
  input  logic            stencil_en,
  input  logic [7:0]      stencil_ref,
  input  logic [31:0]     clear_color,
  input  logic [15:0]     clear_depth,
  input  logic [7:0]      clear_stencil,
  input  logic            clear_start,
  output logic            clear_busy,
  // triangles
  input  logic            tri_valid,
  output logic            tri_ready,
  input  logic [15:0]     tri_idx [3],
  output logic            idle,
  // external bus
  output logic            ext_req_valid,
  input  logic            ext_req_ready,
  output logic [31:0]     ext_req_addr,
  input  logic            ext_rsp_valid,
  input  logic [31:0]     ext_rsp_data,
  // frame buffer read
  input  logic [PAW-1:0]  fb_rd_addr,
  output logic [31:0]     fb_rd_color,
  output logic [15:0]     fb_rd_depth,
  // statistics
  output logic [31:0]     stat_vthreads,
  output logic [31:0]     stat_pthreads,
  output logic [31:0]     stat_aps_threads,
  output logic [31:0]     stat_tiles,
  output logic [31:0]     stat_approx,
  output logic [31:0]     stat_rop_shaded,
  output logic [31:0]     stat_rop_plane,
  output logic [31:0]     stat_rop_avg,
  output logic [31:0]     stat_rop_splat,
  output logic [31:0]     stat_rop_hidden,
  output logic [31:0]     stat_rop_missing,
  output logic [31:0]     stat_task_stall,
  output logic [31:0]     stat_tex [NCL],
  output logic [31:0]     stat_biased [NCL],
  output logic [31:0]     stat_l1_req [NCL],
  output logic [31:0]     stat_l1_fill [NCL],
  output logic [31:0]     stat_l2_req,
  output logic [31:0]     stat_l2_fill,
  output logic [31:0]     stat_ext_words
);
  // ---------------- shader clusters ----------------
  logic [NCORE-1:0] core_busy, core_done, core_in_we, core_start;
  logic [2:0]       core_in_addr, core_out_addr;
  vec4_t            core_in_data;
  logic [7:0]       core_pc;
  vec4_t            core_out [NCORE];
  vec4_t            cl_out [NCL][NCPC];

  logic [NCL-1:0]   l1m_valid, l1m_ready, l1m_rsp_valid;
  logic [31:0]      l1m_addr [NCL];
  logic [127:0]     l2_line;

  for (genvar k = 0; k < NCL; k++) begin : g_cl
    shader_cluster #(.APS(k == NCL - 1), .NCORE(NCPC), .TEX_LOG2(TEX_LOG2), .L1_LINES(L1_LINES)) u_cluster (
      .clk, .rst_n,
      .prog_we, .prog_addr, .prog_data, .const_we, .const_addr, .const_data,
      .bias_we, .bias_waddr, .bias_wdata, .l1_flush(tex_flush),
      .at_en, .tex_base, .tex_log2,
      .in_we(core_in_we[k*NCPC +: NCPC]), .in_addr(core_in_addr), .in_data(core_in_data),
      .out_addr(core_out_addr), .out_data(cl_out[k]),
      .start(core_start[k*NCPC +: NCPC]), .start_pc(core_pc),
      .busy(core_busy[k*NCPC +: NCPC]), .done(core_done[k*NCPC +: NCPC]),
      .l2_req_valid(l1m_valid[k]), .l2_req_ready(l1m_ready[k]), .l2_req_addr(l1m_addr[k]),
      .l2_rsp_valid(l1m_rsp_valid[k]), .l2_rsp_data(l2_line),
      .n_tex(stat_tex[k]), .n_biased(stat_biased[k]), .n_l1_req(stat_l1_req[k]), .n_l1_fill(stat_l1_fill[k]));
    for (genvar c = 0; c < NCPC; c++) begin : g_out
      assign core_out[k*NCPC + c] = cl_out[k][c];
    end
  end

  // ---------------- texture L2 and data fetch ----------------
  logic         l2m_valid, l2m_ready, l2m_rsp_valid;
  logic [31:0]  l2m_addr;
  logic [1:0]   df_req_valid, df_req_ready, df_rsp_valid;
  logic [31:0]  df_req_addr [2];
  logic [127:0] df_line;
  logic         vf_valid, vf_ready;
  logic [31:0]  vf_addr;

  tex_l2_cache #(.NPORT(NCL), .LINES(L2_LINES), .LINE_WORDS(4)) u_l2 (
    .clk, .rst_n, .flush(tex_flush),
    .l1_req_valid(l1m_valid), .l1_req_ready(l1m_ready), .l1_req_addr(l1m_addr),
    .l1_rsp_valid(l1m_rsp_valid), .l1_rsp_data(l2_line),
    .mem_req_valid(l2m_valid), .mem_req_ready(l2m_ready), .mem_req_addr(l2m_addr),
    .mem_rsp_valid(l2m_rsp_valid), .mem_rsp_data(df_line),
    .n_req(stat_l2_req), .n_fill(stat_l2_fill));

  assign df_req_valid   = {vf_valid, l2m_valid};
  assign df_req_addr[0] = l2m_addr;
  assign df_req_addr[1] = vf_addr;
  assign l2m_ready      = df_req_ready[0];
  assign vf_ready       = df_req_ready[1];
  assign l2m_rsp_valid  = df_rsp_valid[0];

  data_fetch #(.NCLI(2), .LINE_WORDS(4)) u_df (
    .clk, .rst_n, .cli_req_valid(df_req_valid), .cli_req_ready(df_req_ready), .cli_req_addr(df_req_addr),
    .cli_rsp_valid(df_rsp_valid), .cli_rsp_data(df_line),
    .ext_req_valid, .ext_req_ready, .ext_req_addr, .ext_rsp_valid, .ext_rsp_data,
    .n_words(stat_ext_words));

  // ---------------- raster ----------------
  logic               r_tri_valid, r_tri_ready, r_pix_valid, r_pix_ready, r_pix_last, r_tri_done;
  logic signed [15:0] r_vx [3], r_vy [3];
  logic signed [31:0] r_vs [3][NS];
  logic [15:0]        r_pix_x, r_pix_y;
  pix_role_e          r_pix_role;
  logic signed [31:0] r_pix_scal [NS];
  logic [31:0]        r_tiles;

  raster #(.NS(NS), .SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_raster (
    .clk, .rst_n, .ssal_en,
    .tri_valid(r_tri_valid), .tri_ready(r_tri_ready), .vx(r_vx), .vy(r_vy), .vs(r_vs),
    .pix_valid(r_pix_valid), .pix_ready(r_pix_ready), .pix_x(r_pix_x), .pix_y(r_pix_y),
    .pix_role(r_pix_role), .pix_last(r_pix_last), .pix_scal(r_pix_scal),
    .tri_done(r_tri_done), .tile_count(r_tiles));

  // ---------------- task dispatcher ----------------
  logic        rop_tile_clear, rop_approx, rop_px_valid, rop_px_ready;
  logic [15:0] rop_px_x, rop_px_y, rop_px_depth;
  logic [31:0] rop_px_color;
  pix_role_e   rop_px_role;
  logic [31:0] d_tiles;

  task_dispatcher #(.NCORE(NCORE), .NFULL(NCORE - NCPC), .NATTR(4), .NVAR(NVAR), .NTASK(NTASK)) u_td (
    .clk, .rst_n, .vs_pc, .ps_pc, .vbase,
    .tri_valid, .tri_ready, .tri_idx, .idle,
    .vf_req_valid(vf_valid), .vf_req_ready(vf_ready), .vf_req_addr(vf_addr),
    .vf_rsp_valid(df_rsp_valid[1]), .vf_rsp_data(df_line),
    .core_busy, .core_done, .core_in_we, .core_in_addr, .core_in_data, .core_start, .core_pc,
    .core_out_addr, .core_out_data(core_out),
    .r_tri_valid, .r_tri_ready, .r_vx, .r_vy, .r_vs,
    .r_pix_valid, .r_pix_ready, .r_pix_x, .r_pix_y, .r_pix_role, .r_pix_last, .r_pix_scal, .r_tri_done,
    .rop_tile_clear, .rop_approx_phase(rop_approx), .rop_px_valid, .rop_px_ready,
    .rop_px_x, .rop_px_y, .rop_px_depth, .rop_px_color, .rop_px_role,
    .n_vthreads(stat_vthreads), .n_pthreads(stat_pthreads), .n_approx(stat_approx), .n_tiles(d_tiles),
    .n_task_stall(stat_task_stall));

  assign stat_tiles = d_tiles;

  // pixel threads that ran on the approximated precision cluster
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stat_aps_threads <= '0;
    else if (|core_start[NCORE-1 -: NCPC] && core_pc == ps_pc) stat_aps_threads <= stat_aps_threads + 1;
  end

  // ---------------- ROP ----------------
  rop_engine #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_rop (
    .clk, .rst_n, .depth_en, .stencil_en, .stencil_ref,
    .clear_color, .clear_depth, .clear_stencil, .clear_start, .clear_busy,
    .tile_clear(rop_tile_clear), .approx_phase(rop_approx),
    .px_valid(rop_px_valid), .px_ready(rop_px_ready), .px_x(rop_px_x), .px_y(rop_px_y),
    .px_depth(rop_px_depth), .px_color(rop_px_color), .px_role(rop_px_role),
    .rd_addr(fb_rd_addr), .rd_color(fb_rd_color), .rd_depth(fb_rd_depth),
    .n_shaded(stat_rop_shaded), .n_plane(stat_rop_plane), .n_avg(stat_rop_avg),
    .n_splat(stat_rop_splat), .n_hidden(stat_rop_hidden), .n_missing(stat_rop_missing));

  // the raster's own tile count equals the dispatcher's; kept for debug visibility
  logic unused_tiles;
  assign unused_tiles = ^r_tiles;
endmodule
