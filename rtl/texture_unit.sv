// texture_unit: per-cluster texture unit with approximated texturing (AT).
//
// Structure after the source's texture unit diagram: a texture coordinate
// generation unit, a texel fetch unit and a texture filter unit, with the
// LOD bias buffer and the texture L1 cache outside.
//  1. A request (texture ID, u, v, LOD as floats) is accepted and converted
//     to fixed point; the LOD is clamped to [0, log2 size].
//  2. With AT enabled (texture ID 0 only, the texture whose complexity map is
//     loaded), the 2-bit bias at (level, texel) is read from the LOD bias
//     buffer (one extra, indirect access) and added to the integer LOD,
//     clamped to the coarsest level, so the request moves to a smaller mip
//     level. bias_rd_en is high for one cycle; the buffer's registered
//     answer bias_in is used in the cycle after it.
//  3. For the one or two levels used (two for trilinear filtering when the
//     LOD has a fraction) the texel coordinates u*size-0.5, v*size-0.5 give
//     four texels and the bilinear weights; addresses wrap (repeat mode).
//  4. The texel fetch unit reads the 4 or 8 texels from the L1 cache, one
//     request at a time.
//  5. The filter blends bilinearly per level and linearly between levels
//     with 8-bit weights, and the RGBA8 result is returned (rsp_valid pulse).
// Textures are RGBA8, one texel per 32-bit word, mip level k of a 2^L square
// texture at word offset sum_{j<k} 4^(L-j) from the base, row-major. These
// layout and weight formats are this design's choices. n_tex counts requests,
// n_biased those whose LOD the bias raised.
module texture_unit
  import gpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        at_en,
  input  logic [31:0] tex_base,
  input  logic [3:0]  tex_log2,
  // from the shader cores
  input  logic        req_valid,
  output logic        req_ready,
  input  logic [7:0]  req_id,
  input  vec4_t       req_coord,
  output logic        rsp_valid,
  output logic [31:0] rsp_rgba,
  // LOD bias buffer
  output logic        bias_rd_en,
  output logic [3:0]  bias_level,
  output logic [15:0] bias_x,
  output logic [15:0] bias_y,
  input  logic [1:0]  bias_in,
  // texture L1 cache
  output logic        l1_req_valid,
  input  logic        l1_req_ready,
  output logic [31:0] l1_req_addr,
  input  logic        l1_rsp_valid,
  input  logic [31:0] l1_rsp_data,
  output logic [31:0] n_tex,
  output logic [31:0] n_biased
);
  typedef enum logic [2:0] { T_IDLE, T_BIAS, T_BIASW, T_SETUP, T_REQ, T_WAIT, T_FILTER } state_e;
  state_e state;

  logic signed [31:0] u_q, v_q;       // Q16.16
  logic [3:0]  lod_i, lv0, lv1;
  logic [7:0]  lod_f;
  logic        two_lv;
  logic [2:0]  t;                     // texel being fetched
  logic [31:0] texel [8];
  logic [15:0] x0 [2], y0 [2];
  logic [7:0]  fx [2], fy [2];

  // texel coordinate of a level: integer part (wrapped) and 8-bit fraction
  function automatic void coord(input logic signed [31:0] q, input logic [3:0] sl,
                                output logic [15:0] i, output logic [7:0] f);
    logic signed [47:0] tq;
    tq = (48'(q) <<< sl) - 48'sh8000;
    i  = 16'(tq >>> 16) & 16'((1 << sl) - 1);
    f  = tq[15:8];
  endfunction

  function automatic logic [31:0] lvl_off(input logic [3:0] lv);
    logic [31:0] o;
    o = 0;
    for (int j = 0; j < 15; j++)
      if (j < int'(lv)) o = o + (32'd1 << (2 * (int'(tex_log2) - j)));
    return o;
  endfunction

  // address of texel t
  always_comb begin
    logic        l;
    logic [3:0]  lv, sl;
    logic [15:0] xx, yy, msk;
    l   = t[2];
    lv  = l ? lv1 : lv0;
    sl  = tex_log2 - lv;
    msk = 16'((1 << sl) - 1);
    xx  = (x0[l] + 16'(t[0])) & msk;
    yy  = (y0[l] + 16'(t[1])) & msk;
    l1_req_addr = tex_base + lvl_off(lv) + (32'(yy) << sl) + 32'(xx);
  end

  assign req_ready    = state == T_IDLE;
  assign l1_req_valid = state == T_REQ;
  assign bias_level   = lod_i;
  always_comb begin
    logic [7:0] f;
    coord(u_q, tex_log2 - lod_i, bias_x, f);
    coord(v_q, tex_log2 - lod_i, bias_y, f);
  end

  // filter
  function automatic logic [7:0] bilerp(input logic [7:0] a, b, c, d, input logic [7:0] wx, wy);
    logic [16:0] top, bot;
    logic [25:0] r;
    top = 17'(a) * (17'd256 - 17'(wx)) + 17'(b) * 17'(wx);
    bot = 17'(c) * (17'd256 - 17'(wx)) + 17'(d) * 17'(wx);
    r   = 26'(top) * (26'd256 - 26'(wy)) + 26'(bot) * 26'(wy);
    return r[23:16];
  endfunction

  logic [31:0] filt;
  always_comb begin
    for (int ch = 0; ch < 4; ch++) begin
      logic [7:0] c0, c1;
      logic [16:0] m;
      c0 = bilerp(texel[0][ch*8 +: 8], texel[1][ch*8 +: 8], texel[2][ch*8 +: 8], texel[3][ch*8 +: 8], fx[0], fy[0]);
      c1 = bilerp(texel[4][ch*8 +: 8], texel[5][ch*8 +: 8], texel[6][ch*8 +: 8], texel[7][ch*8 +: 8], fx[1], fy[1]);
      m  = two_lv ? (17'(c0) * (17'd256 - 17'(lod_f)) + 17'(c1) * 17'(lod_f)) : {1'b0, c0, 8'd0};
      filt[ch*8 +: 8] = m[15:8];
    end
  end

  // requested LOD in Q16.16, biased integer LOD, next coarser level
  logic signed [31:0] lq;
  logic [4:0]         nl;
  logic [3:0]         l1;
  always_comb begin
    lq = f32_to_fix(req_coord[2]);
    nl = 5'(lod_i) + 5'(bias_in);
    l1 = (lod_i == tex_log2) ? lod_i : lod_i + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= T_IDLE;
      rsp_valid <= 1'b0; rsp_rgba <= '0; bias_rd_en <= 1'b0;
      u_q <= '0; v_q <= '0; lod_i <= '0; lod_f <= '0; lv0 <= '0; lv1 <= '0; two_lv <= 1'b0;
      t <= '0; n_tex <= '0; n_biased <= '0;
      for (int l = 0; l < 2; l++) begin x0[l] <= '0; y0[l] <= '0; fx[l] <= '0; fy[l] <= '0; end
      for (int i = 0; i < 8; i++) texel[i] <= '0;
    end else begin
      rsp_valid  <= 1'b0;
      bias_rd_en <= 1'b0;
      unique case (state)
        T_IDLE: if (req_valid) begin
          n_tex <= n_tex + 1;
          u_q <= f32_to_fix(req_coord[0]);
          v_q <= f32_to_fix(req_coord[1]);
          if (lq < 0) begin lod_i <= '0; lod_f <= '0; end
          else if (lq >= (32'sd1 <<< 16) * 32'(tex_log2)) begin lod_i <= tex_log2; lod_f <= '0; end
          else begin lod_i <= lq[19:16]; lod_f <= lq[15:8]; end
          if (at_en && req_id == 8'd0) begin
            bias_rd_en <= 1'b1;
            state <= T_BIAS;
          end else state <= T_SETUP;
        end
        T_BIAS: state <= T_BIASW;   // buffer registers the bias read
        T_BIASW: begin         // bias_in valid this cycle
          if (bias_in != 0 && lod_i != tex_log2) n_biased <= n_biased + 1;
          lod_i <= (nl > 5'(tex_log2)) ? tex_log2 : nl[3:0];
          state <= T_SETUP;
        end
        T_SETUP: begin
          lv0 <= lod_i;
          lv1 <= l1;
          two_lv <= lod_f != 0 && lod_i != tex_log2;
          coord(u_q, tex_log2 - lod_i, x0[0], fx[0]);
          coord(v_q, tex_log2 - lod_i, y0[0], fy[0]);
          coord(u_q, tex_log2 - l1, x0[1], fx[1]);
          coord(v_q, tex_log2 - l1, y0[1], fy[1]);
          t <= '0;
          state <= T_REQ;
        end
        T_REQ: if (l1_req_ready) state <= T_WAIT;
        T_WAIT: if (l1_rsp_valid) begin
          texel[t] <= l1_rsp_data;
          if (t == 3'd3 && !two_lv) state <= T_FILTER;
          else if (t == 3'd7) state <= T_FILTER;
          else begin t <= t + 1'b1; state <= T_REQ; end
        end
        T_FILTER: begin
          rsp_valid <= 1'b1;
          rsp_rgba  <= filt;
          state     <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end
endmodule
