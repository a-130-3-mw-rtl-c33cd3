// ssal_reconstruction: screen-space reconstruction unit of the ROP
// (Sec. VI, Fig. 16, 17).
//
// Collects the shaded colours of the current 8x4 tile in the shaded pixel
// colour buffer (one RGBA8 entry and a valid bit per tile pixel, cleared by
// tile_clear) and produces the colour of an approximated pixel:
//  * PR_PLANE (4x4 plane fitting): the coefficient gen unit fits
//    f(x,y) = a*x + b*y + c by least squares to the four shaded corners of
//    the pixel's 4x4 half tile (x, y in 0..3). Because the sample positions
//    are fixed, (A^T A)^-1 A^T is a constant matrix and the fit reduces to
//    S = I0+I1+I2+I3, Dx = I1+I3-I0-I2, Dy = I2+I3-I0-I1 with
//    a = Dx/6, b = Dy/6, c = S/4 - 1.5a - 1.5b. The interpolation unit then
//    evaluates 12*f = 3*S + (2x-3)*Dx + (2y-3)*Dy and divides by 12 with
//    rounding, clamped to 0..255 (the scaled form S, Dx, Dy of the
//    coefficients is this design's choice).
//  * PR_AVG2 (full or partial 2x2 interpolation): the 2x2 average unit
//    averages the two shaded pixels of the pixel's 2x2 block (rounded).
//  * PR_SPLAT (one-point splat): the pixel forwarding path copies the single
//    shaded pixel of its 2x2 block.
// The approximation pattern checking uses the pixel's tile-local index and
// role. Corner order I0..I3 = (0,0), (3,0), (0,3), (3,3). Writes are
// registered; the query (q_idx, q_role -> q_color) is combinational.
module ssal_reconstruction
  import gpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        tile_clear,
  input  logic        wr_en,
  input  logic [4:0]  wr_idx,
  input  logic [31:0] wr_color,
  input  logic [4:0]  q_idx,
  input  pix_role_e   q_role,
  output logic [31:0] q_color,
  output logic        q_ok        // the samples the role needs are present
);
  logic [31:0]         cbuf [TILE_PIX];
  logic [TILE_PIX-1:0] cvalid;

  always_ff @(posedge clk) if (wr_en) cbuf[wr_idx] <= wr_color;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cvalid <= '0;
    else if (tile_clear) cvalid <= '0;
    else if (wr_en) cvalid[wr_idx] <= 1'b1;
  end

  // approximation pattern checking: sample positions of the query
  logic [2:0] col;
  logic [1:0] row;
  logic [4:0] k0, k1, k2, k3, b00, b10, b01, b11;
  assign col = q_idx[2:0];
  assign row = q_idx[4:3];
  assign k0  = {2'd0, col[2], 2'd0};
  assign k1  = {2'd0, col[2], 2'd3};
  assign k2  = {2'd3, col[2], 2'd0};
  assign k3  = {2'd3, col[2], 2'd3};
  assign b00 = {row[1], 1'b0, col[2:1], 1'b0};
  assign b10 = {row[1], 1'b0, col[2:1], 1'b1};
  assign b01 = {row[1], 1'b1, col[2:1], 1'b0};
  assign b11 = {row[1], 1'b1, col[2:1], 1'b1};

  always_comb begin
    logic [3:0] bv;
    logic [9:0] bsum;
    logic [2:0] bn;
    q_color = '0;
    bv = {cvalid[b11], cvalid[b01], cvalid[b10], cvalid[b00]};
    bn = 3'(bv[0]) + 3'(bv[1]) + 3'(bv[2]) + 3'(bv[3]);
    unique case (q_role)
      PR_PLANE: q_ok = cvalid[k0] && cvalid[k1] && cvalid[k2] && cvalid[k3];
      PR_AVG2:  q_ok = bn == 3'd2;
      PR_SPLAT: q_ok = bn == 3'd1;
      default:  q_ok = 1'b0;
    endcase
    for (int ch = 0; ch < 4; ch++) begin
      logic signed [11:0] i0, i1, i2, i3, s, dx, dy;
      logic signed [15:0] f12, f;
      i0 = 12'(cbuf[k0][ch*8 +: 8]);
      i1 = 12'(cbuf[k1][ch*8 +: 8]);
      i2 = 12'(cbuf[k2][ch*8 +: 8]);
      i3 = 12'(cbuf[k3][ch*8 +: 8]);
      // coefficient gen unit (scaled coefficients)
      s  = i0 + i1 + i2 + i3;
      dx = i1 + i3 - i0 - i2;
      dy = i2 + i3 - i0 - i1;
      // interpolation unit
      f12 = 16'sd3 * 16'(s) + (16'sd2 * 16'(col[1:0]) - 16'sd3) * 16'(dx)
                            + (16'sd2 * 16'(row) - 16'sd3) * 16'(dy);
      f   = (f12 + 16'sd6) / 16'sd12;
      if (f12 < 0) f = 0;
      // 2x2 average unit / pixel forwarding path
      bsum = (bv[0] ? 10'(cbuf[b00][ch*8 +: 8]) : 10'd0) + (bv[1] ? 10'(cbuf[b10][ch*8 +: 8]) : 10'd0) +
             (bv[2] ? 10'(cbuf[b01][ch*8 +: 8]) : 10'd0) + (bv[3] ? 10'(cbuf[b11][ch*8 +: 8]) : 10'd0);
      unique case (q_role)
        PR_PLANE: q_color[ch*8 +: 8] = (f > 255) ? 8'd255 : f[7:0];
        PR_AVG2:  q_color[ch*8 +: 8] = 8'((bsum + 10'd1) >> 1);
        PR_SPLAT: q_color[ch*8 +: 8] = bsum[7:0];
        default:  q_color[ch*8 +: 8] = 8'd0;
      endcase
    end
  end
endmodule
