// raster: tile-based raster unit (Sec. III-B, Fig. 7).
//
// Pipeline of four parts joined by two SRAMs, as in the source:
//   triangle_setup  -> plane equation SRAM (one {M,N,C} word per scalar)
//   tile_traversal  -> per 8x4 tile: interior_traversal makes the 32-bit
//                      valid map, ssal_subdivision_test the SSAL pixel roles,
//                      and the leftmost-column values of every scalar go to
//                      the tile scalar value SRAM
//   interpolation_unit -> 16 pixels of one scalar per cycle (two cycles per
//                      scalar for the tile) into a 32-pixel tile buffer.
// The covered pixels of the tile are then sent out one per cycle with their
// screen position, SSAL role and NS scalars (signed Q16.16; scalar 0 is the
// depth). pix_last marks the last pixel of a tile. The unit works on one
// tile at a time; the next tile is fetched after the last pixel is taken.
// Handshakes: tri_valid/tri_ready for triangles (integer vertex positions,
// Q16.16 scalars), pix_valid/pix_ready for pixels; tri_done pulses when a
// triangle has been fully rasterised. Cost per non-empty tile: 1 + (NS+1) +
// (2*NS+1) cycles plus one per covered pixel. The serial pixel output and the
// one-tile-at-a-time schedule are this design's simplifications.
module raster
  import gpu_pkg::*;
#(
  parameter int unsigned NS       = 9,
  parameter int unsigned SCREEN_W = 512,
  parameter int unsigned SCREEN_H = 512
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ssal_en,
  input  logic               tri_valid,
  output logic               tri_ready,
  input  logic signed [15:0] vx [3],
  input  logic signed [15:0] vy [3],
  input  logic signed [31:0] vs [3][NS],
  output logic               pix_valid,
  input  logic               pix_ready,
  output logic [15:0]        pix_x,
  output logic [15:0]        pix_y,
  output pix_role_e          pix_role,
  output logic               pix_last,
  output logic signed [31:0] pix_scal [NS],
  output logic               tri_done,
  output logic [31:0]        tile_count
);
  localparam int unsigned KW = (NS > 1) ? $clog2(NS) : 1;

  // ---------------- triangle setup + plane equation SRAM ----------------
  logic               ts_done, ts_culled, pe_we;
  logic [KW-1:0]      pe_waddr, pe_raddr;
  logic [143:0]       pe_wdata, pe_rdata;
  logic signed [31:0] alpha [3], beta [3], gamma [3];
  logic signed [15:0] xmin, xmax, ymin, ymax, top_x;

  triangle_setup #(.NS(NS)) u_setup (
    .clk, .rst_n, .in_valid(tri_valid), .in_ready(tri_ready), .vx, .vy, .vs,
    .done(ts_done), .culled(ts_culled), .alpha, .beta, .gamma,
    .xmin, .xmax, .ymin, .ymax, .top_x,
    .pe_we, .pe_addr(pe_waddr), .pe_data(pe_wdata));

  sram_1r1w #(.DEPTH(NS), .WIDTH(144)) u_plane_sram (
    .clk, .we(pe_we), .waddr(pe_waddr), .wdata(pe_wdata), .raddr(pe_raddr), .rdata(pe_rdata));

  // ---------------- tile traversal ----------------
  logic        tt_valid, tt_ready, tt_done;
  logic        scan_end;   // the tile scan of the current triangle has finished
  logic [15:0] tt_x, tt_y;
  tile_traversal #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_tiles (
    .clk, .rst_n, .start(ts_done && !ts_culled), .alpha, .beta, .gamma,
    .xmin, .xmax, .ymin, .ymax, .top_x,
    .tile_valid(tt_valid), .tile_ready(tt_ready), .tile_x(tt_x), .tile_y(tt_y), .done(tt_done));

  // ---------------- interior traversal + subdivision test ----------------
  logic [15:0]         cur_x, cur_y;
  logic [TILE_PIX-1:0] vmap;
  logic signed [47:0]  left_col [TILE_H];
  pix_role_e           roles [TILE_PIX], cur_roles [TILE_PIX];

  interior_traversal #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_interior (
    .tile_x(cur_x), .tile_y(cur_y), .alpha, .beta, .gamma,
    .plane_m(pe_rdata[143:96]), .plane_n(pe_rdata[95:48]), .plane_c(pe_rdata[47:0]),
    .valid_map(vmap), .left_col);

  ssal_subdivision_test u_subdiv (.ssal_en, .valid_map(vmap), .role(roles));

  // ---------------- tile scalar value SRAM + interpolation ----------------
  logic          sv_we;
  logic [KW-1:0] sv_waddr, sv_raddr;
  logic [191:0]  sv_wdata, sv_rdata;
  logic signed [47:0] sv_left [TILE_H];
  logic signed [31:0] ivals [16];
  logic          ihalf;

  sram_1r1w #(.DEPTH(NS), .WIDTH(192)) u_tile_sram (
    .clk, .we(sv_we), .waddr(sv_waddr), .wdata(sv_wdata), .raddr(sv_raddr), .rdata(sv_rdata));

  always_comb begin
    for (int r = 0; r < TILE_H; r++) sv_left[r] = sv_rdata[r*48 +: 48];
  end

  interpolation_unit u_interp (.left_col(sv_left), .plane_m(pe_rdata[143:96]), .half(ihalf), .value(ivals));

  // ---------------- control ----------------
  typedef enum logic [2:0] { R_IDLE, R_MAP, R_LEFT, R_INTERP, R_OUT } state_e;
  state_e state;
  logic [KW:0]        k;              // scalar index of the read in flight
  logic               rd_pend;
  logic               rd_half, pend_half;
  logic [KW-1:0]      pend_k;
  logic signed [31:0] pixbuf [TILE_PIX][NS];
  logic [4:0]         op;             // output pixel index
  logic [TILE_PIX-1:0] pend_map;

  assign tt_ready = state == R_IDLE;
  assign pe_raddr = KW'(k);
  assign sv_raddr = KW'(k);
  assign ihalf    = pend_half;

  // next covered pixel at or after op
  logic [4:0] nxt;
  logic       more;
  always_comb begin
    nxt = op; more = 1'b0;
    for (int p = TILE_PIX - 1; p >= 0; p--)
      if (pend_map[p] && 5'(p) != op) begin nxt = 5'(p); more = 1'b1; end
  end

  assign pix_valid = state == R_OUT;
  assign pix_x     = 16'(cur_x * TILE_W) + 16'(op[2:0]);
  assign pix_y     = 16'(cur_y * TILE_H) + 16'(op[4:3]);
  assign pix_role  = cur_roles[op];
  assign pix_last  = !more;
  always_comb for (int s = 0; s < NS; s++) pix_scal[s] = pixbuf[op][s];

  always_ff @(posedge clk) begin
    if (state == R_INTERP && rd_pend) begin
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++)
          pixbuf[j*TILE_W + (pend_half ? 4 : 0) + i][pend_k] <= ivals[j*4 + i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      tri_done <= 1'b0;
      scan_end <= 1'b0;
      k <= '0; rd_pend <= 1'b0; rd_half <= 1'b0; pend_half <= 1'b0; pend_k <= '0;
      sv_we <= 1'b0; sv_waddr <= '0; sv_wdata <= '0;
      cur_x <= '0; cur_y <= '0; op <= '0; pend_map <= '0;
      tile_count <= '0;
      for (int p = 0; p < TILE_PIX; p++) cur_roles[p] <= PR_NONE;
    end else begin
      tri_done <= 1'b0;
      sv_we    <= 1'b0;
      if (ts_done && ts_culled) tri_done <= 1'b1;
      if (tt_done) scan_end <= 1'b1;
      unique case (state)
        R_IDLE: begin
          if (tt_valid) begin
            cur_x <= tt_x;
            cur_y <= tt_y;
            state <= R_MAP;
          end else if (scan_end || tt_done) begin
            tri_done <= 1'b1;
            scan_end <= 1'b0;
          end
        end
        R_MAP: begin
          cur_roles <= roles;
          pend_map      <= vmap;
          if (vmap == '0) state <= R_IDLE;
          else begin
            tile_count <= tile_count + 1;
            state   <= R_LEFT;
            k       <= '0;
            rd_pend <= 1'b0;
          end
        end
        R_LEFT: begin
          // read plane k, next cycle write its leftmost column
          rd_pend <= int'(k) < NS;
          pend_k  <= KW'(k);
          if (rd_pend) begin
            sv_we    <= 1'b1;
            sv_waddr <= pend_k;
            for (int r = 0; r < TILE_H; r++) sv_wdata[r*48 +: 48] <= left_col[r];
          end
          if (int'(k) < NS) k <= k + 1'b1;
          else if (rd_pend) begin
            state   <= R_INTERP;
            k       <= '0;
            rd_half <= 1'b0;
            rd_pend <= 1'b0;
          end
        end
        R_INTERP: begin
          rd_pend   <= int'(k) < NS;
          pend_k    <= KW'(k);
          pend_half <= rd_half;
          if (int'(k) < NS) begin
            rd_half <= !rd_half;
            if (rd_half) k <= k + 1'b1;
          end else if (!rd_pend) begin
            state <= R_OUT;
            op    <= '0;
            for (int p = TILE_PIX - 1; p >= 0; p--) if (pend_map[p]) op <= 5'(p);
          end
        end
        R_OUT: if (pix_ready) begin
          pend_map[op] <= 1'b0;
          if (more) op <= nxt;
          else state <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
