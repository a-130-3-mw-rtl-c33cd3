// shader_cluster: one of the four shader clusters (Sec. II, Fig. 2).
//
// Four unified shader cores (APS = 1 builds them as approximated precision
// cores, as in shader cluster 3), one texture unit with approximated
// texturing, its LOD bias buffer and its texture L1 cache. The cores' TEX
// requests are served one at a time in round-robin order; the filtered texel
// returns to the requesting core. Program, constants and the LOD bias map are
// loaded by broadcast writes. The task dispatcher writes a core's input
// buffer (in_we[c]), starts it (start[c]) and reads its output buffer
// (out_data[c]) after done[c]. L1 misses leave as line requests (l2_*).
// Round-robin arbitration of the texture requests is this design's choice.
module shader_cluster
  import gpu_pkg::*;
#(
  parameter bit          APS       = 1'b0,
  parameter int unsigned NCORE     = 4,
  parameter int unsigned TEX_LOG2  = 8,
  parameter int unsigned L1_LINES  = 256,
  localparam int unsigned BWAW = $clog2(((((1 << (2*TEX_LOG2 + 2)) - 1) / 3) + 15) / 16)
) (
  input  logic              clk,
  input  logic              rst_n,
  // broadcast loads
  input  logic              prog_we,
  input  logic [7:0]        prog_addr,
  input  instr_t            prog_data,
  input  logic              const_we,
  input  logic [3:0]        const_addr,
  input  vec4_t             const_data,
  input  logic              bias_we,
  input  logic [BWAW-1:0]   bias_waddr,
  input  logic [31:0]       bias_wdata,
  input  logic              l1_flush,
  // configuration
  input  logic              at_en,
  input  logic [31:0]       tex_base,
  input  logic [3:0]        tex_log2,
  // thread control from the task dispatcher
  input  logic [NCORE-1:0]  in_we,
  input  logic [2:0]        in_addr,
  input  vec4_t             in_data,
  input  logic [2:0]        out_addr,
  output vec4_t             out_data [NCORE],
  input  logic [NCORE-1:0]  start,
  input  logic [7:0]        start_pc,
  output logic [NCORE-1:0]  busy,
  output logic [NCORE-1:0]  done,
  // texture L2 side
  output logic              l2_req_valid,
  input  logic              l2_req_ready,
  output logic [31:0]       l2_req_addr,
  input  logic              l2_rsp_valid,
  input  logic [127:0]      l2_rsp_data,
  // statistics
  output logic [31:0]       n_tex,
  output logic [31:0]       n_biased,
  output logic [31:0]       n_l1_req,
  output logic [31:0]       n_l1_fill
);
  localparam int unsigned CW = (NCORE > 1) ? $clog2(NCORE) : 1;

  logic [NCORE-1:0] c_req_valid, c_req_ready, c_rsp_valid;
  logic [7:0]       c_req_id [NCORE];
  vec4_t            c_req_coord [NCORE];
  logic             tu_req_ready, tu_rsp_valid;
  logic [31:0]      tu_rsp_rgba;

  for (genvar c = 0; c < NCORE; c++) begin : g_core
    shader_core #(.APS(APS)) u_core (
      .clk, .rst_n,
      .prog_we, .prog_addr, .prog_data, .const_we, .const_addr, .const_data,
      .in_we(in_we[c]), .in_addr, .in_data, .out_addr, .out_data(out_data[c]),
      .start(start[c]), .start_pc, .busy(busy[c]), .done(done[c]),
      .tex_req_valid(c_req_valid[c]), .tex_req_ready(c_req_ready[c]),
      .tex_req_id(c_req_id[c]), .tex_req_coord(c_req_coord[c]),
      .tex_rsp_valid(c_rsp_valid[c]), .tex_rsp_rgba(tu_rsp_rgba));
  end

  // ---- texture request arbitration ----
  logic          t_busy;
  logic [CW-1:0] t_owner, t_prio, t_pick;
  logic          t_any;

  always_comb begin
    t_pick = t_prio; t_any = 1'b0;
    for (int i = NCORE - 1; i >= 0; i--) begin
      logic [CW-1:0] c;
      c = CW'((int'(t_prio) + i) % NCORE);
      if (c_req_valid[c]) begin t_pick = c; t_any = 1'b1; end
    end
  end

  always_comb begin
    c_req_ready = '0;
    c_rsp_valid = '0;
    if (!t_busy && t_any) c_req_ready[t_pick] = tu_req_ready;
    if (t_busy) c_rsp_valid[t_owner] = tu_rsp_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_busy <= 1'b0; t_owner <= '0; t_prio <= '0;
    end else if (!t_busy) begin
      if (t_any && tu_req_ready) begin
        t_busy  <= 1'b1;
        t_owner <= t_pick;
      end
    end else if (tu_rsp_valid) begin
      t_busy <= 1'b0;
      t_prio <= CW'((int'(t_owner) + 1) % NCORE);
    end
  end

  // ---- texture unit, LOD bias buffer, L1 cache ----
  logic        b_rd_en;
  logic [3:0]  b_level;
  logic [15:0] b_x, b_y;
  logic [1:0]  b_bias;
  logic        l1_req_valid, l1_req_ready, l1_rsp_valid;
  logic [31:0] l1_req_addr, l1_rsp_data;
  logic [127:0] l1_rsp_line;

  texture_unit u_tex (
    .clk, .rst_n, .at_en, .tex_base, .tex_log2,
    .req_valid(!t_busy && t_any), .req_ready(tu_req_ready),
    .req_id(c_req_id[t_pick]), .req_coord(c_req_coord[t_pick]),
    .rsp_valid(tu_rsp_valid), .rsp_rgba(tu_rsp_rgba),
    .bias_rd_en(b_rd_en), .bias_level(b_level), .bias_x(b_x), .bias_y(b_y), .bias_in(b_bias),
    .l1_req_valid, .l1_req_ready, .l1_req_addr, .l1_rsp_valid, .l1_rsp_data,
    .n_tex, .n_biased);

  lod_bias_buffer #(.TEX_LOG2(TEX_LOG2)) u_bias (
    .clk, .wr_en(bias_we), .wr_addr(bias_waddr), .wr_data(bias_wdata),
    .rd_en(b_rd_en), .rd_level(b_level), .rd_x(b_x), .rd_y(b_y), .bias(b_bias));

  tex_cache #(.LINES(L1_LINES), .LINE_WORDS(4)) u_l1 (
    .clk, .rst_n, .flush(l1_flush),
    .req_valid(l1_req_valid), .req_ready(l1_req_ready), .req_addr(l1_req_addr),
    .rsp_valid(l1_rsp_valid), .rsp_data(l1_rsp_data), .rsp_line(l1_rsp_line),
    .mem_req_valid(l2_req_valid), .mem_req_ready(l2_req_ready), .mem_req_addr(l2_req_addr),
    .mem_rsp_valid(l2_rsp_valid), .mem_rsp_data(l2_rsp_data),
    .n_req(n_l1_req), .n_fill(n_l1_fill));

  // the word output is used; the line output of the L1 is not needed
  logic unused_line;
  assign unused_line = ^l1_rsp_line;
endmodule
