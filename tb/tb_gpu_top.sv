// tb_gpu_top: end-to-end test of the complete GPU at its default size
// (512x512 ROP buffer, 256x256 texture levels, 64 KB texture L2).
//
// The testbench plays host and external memory. Memory holds nine vertices
// (4 attributes x vec4 each, 16 words per vertex) and a texture read through
// the L2/L1 hierarchy whose texels are all 0xFFFFFFFF (255/256 per channel),
// so the shaded colour of a pixel is predictable: colour = 255/256 * the
// interpolated vertex colour. The LOD bias map is loaded with bias 1.
//
// Programs (encoded with the design's instruction format):
//  vertex: r0 = i0*c0 ; o0 = r0+c1 ; o1 = i1 ; o2 = i2 ; END
//  pixel : JMP 19 ; END ; END ; o0 = MOV i0 (full-precision position) ;
//          r14 = MOV i2 ; r1 = TEX r14 (trilinear, LOD 1.5 + bias) ;
//          o1 = r1*i1 ; END
// Scene: triangle A (SSAL on), triangle B inside A but behind it (all of its
// pixels must fail the depth test), triangle C elsewhere with SSAL off (mode
// switch: every covered pixel shaded).
// Checks: every pixel of A's and C's bounding boxes against an independent
// coverage/interpolation model (colour within +-4 LSB to allow for the
// approximated precision cluster, the SSAL reconstruction and fixed-point
// interpolation; depth exact; uncovered pixels keep the clear colour), pixel
// accounting (shaded + reconstructed = covered, none missing), and that every
// mechanism happened: vertex and pixel threads, threads on the APS cluster,
// the three SSAL patterns, the approximation phase, LOD bias use, texture L1
// and L2 misses and hits, external bus reads, depth-hidden pixels, the
// SSAL-off mode, and a cycle bound per triangle.
module tb_gpu_top;
  import gpu_pkg::*;
  import tb_pkg::*;

  localparam int SW = 512, SH = 512, TL2 = 8;
  localparam int BWORDS = ((((1 << (2*TL2 + 2)) - 1) / 3) + 15) / 16;
  localparam int BWAW = $clog2(BWORDS);
  localparam logic [31:0] TEX_BASE = 32'h0010_0000;
  localparam logic [31:0] CLEAR_C  = 32'h1122_3344;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // ---------------- DUT ----------------
  logic prog_we = 0, const_we = 0, bias_we = 0, tex_flush = 0;
  logic [7:0] prog_addr = 0; instr_t prog_data = '0;
  logic [3:0] const_addr = 0; vec4_t const_data = '0;
  logic [BWAW-1:0] bias_waddr = 0; logic [31:0] bias_wdata = 0;
  logic ssal_en = 1, at_en = 1, depth_en = 1, stencil_en = 1, clear_start = 0, clear_busy;
  logic tri_valid = 0, tri_ready, idle;
  logic [15:0] tri_idx [3];
  logic ext_req_valid, ext_rsp_valid = 0;
  logic [31:0] ext_req_addr, ext_rsp_data = 0;
  logic [17:0] fb_rd_addr = 0;
  logic [31:0] fb_rd_color; logic [15:0] fb_rd_depth;
  logic [31:0] s_vth, s_pth, s_aps, s_tiles, s_apx, s_sh, s_pl, s_av, s_sp, s_hid, s_mis, s_stall;
  logic [31:0] s_tex [4], s_bias [4], s_l1r [4], s_l1f [4], s_l2r, s_l2f, s_ext;

  gpu_top dut (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .const_we, .const_addr, .const_data,
    .bias_we, .bias_waddr, .bias_wdata, .tex_flush,
    .ssal_en, .at_en, .tex_base(TEX_BASE), .tex_log2(4'(TL2)), .vs_pc(8'd0), .ps_pc(8'd16), .vbase(32'd0),
    .depth_en, .stencil_en, .stencil_ref(8'h5A), .clear_color(CLEAR_C), .clear_depth(16'hFFFF),
    .clear_stencil(8'h5A), .clear_start, .clear_busy,
    .tri_valid, .tri_ready, .tri_idx, .idle,
    .ext_req_valid, .ext_req_ready(1'b1), .ext_req_addr, .ext_rsp_valid, .ext_rsp_data,
    .fb_rd_addr, .fb_rd_color, .fb_rd_depth,
    .stat_vthreads(s_vth), .stat_pthreads(s_pth), .stat_aps_threads(s_aps), .stat_tiles(s_tiles),
    .stat_approx(s_apx), .stat_rop_shaded(s_sh), .stat_rop_plane(s_pl), .stat_rop_avg(s_av),
    .stat_rop_splat(s_sp), .stat_rop_hidden(s_hid), .stat_rop_missing(s_mis), .stat_task_stall(s_stall),
    .stat_tex(s_tex), .stat_biased(s_bias), .stat_l1_req(s_l1r), .stat_l1_fill(s_l1f),
    .stat_l2_req(s_l2r), .stat_l2_fill(s_l2f), .stat_ext_words(s_ext));

  // ---------------- external memory ----------------
  logic [31:0] vmem [256];
  always_ff @(posedge clk) begin
    ext_rsp_valid <= ext_req_valid;
    if (ext_req_valid)
      ext_rsp_data <= (ext_req_addr < 32'd256) ? vmem[ext_req_addr[7:0]] :
                      (ext_req_addr >= TEX_BASE) ? 32'hFFFF_FFFF : 32'hDEAD_BEEF;
  end

  // ---------------- scene ----------------
  real vx [9], vy [9], vz [9];
  real vc [9][4];
  int  ext_reads_tex = 0;
  always_ff @(posedge clk) if (ext_req_valid && ext_req_addr >= TEX_BASE) ext_reads_tex <= ext_reads_tex + 1;

  task automatic set_vtx(int i, real x, real y, real z, real r, real g, real b, real u, real v);
    vec4_t p, c, t;
    vx[i] = x; vy[i] = y; vz[i] = z;
    vc[i][0] = r; vc[i][1] = g; vc[i][2] = b; vc[i][3] = 1.0;
    p = v4(x, y, z, 1.0); c = v4(r, g, b, 1.0); t = v4(u, v, 1.5, 0.0);
    for (int l = 0; l < 4; l++) begin
      vmem[i*16 + l]      = p[l];
      vmem[i*16 + 4 + l]  = c[l];
      vmem[i*16 + 8 + l]  = t[l];
      vmem[i*16 + 12 + l] = 32'h0;
    end
  endtask

  // independent reference: inside test with the three edge functions
  function automatic bit in_tri(int t, int x, int y);
    real a, e;
    int i0 = 3*t;
    a = (vx[i0+1]-vx[i0])*(vy[i0+2]-vy[i0]) - (vx[i0+2]-vx[i0])*(vy[i0+1]-vy[i0]);
    for (int k = 0; k < 3; k++) begin
      int p = i0 + k, q = i0 + (k + 1) % 3;
      e = (vx[q]-vx[p])*(real'(y)-vy[p]) - (vy[q]-vy[p])*(real'(x)-vx[p]);
      if (a < 0) e = -e;
      if (e < 0) return 0;
    end
    return 1;
  endfunction

  // barycentric interpolation of colour lane l at (x, y)
  function automatic real interp(int t, int l, int x, int y);
    int i0 = 3*t;
    real a, w1, w2;
    a  = (vx[i0+1]-vx[i0])*(vy[i0+2]-vy[i0]) - (vx[i0+2]-vx[i0])*(vy[i0+1]-vy[i0]);
    w1 = ((real'(x)-vx[i0])*(vy[i0+2]-vy[i0]) - (vx[i0+2]-vx[i0])*(real'(y)-vy[i0])) / a;
    w2 = ((vx[i0+1]-vx[i0])*(real'(y)-vy[i0]) - (real'(x)-vx[i0])*(vy[i0+1]-vy[i0])) / a;
    return vc[i0][l] + w1*(vc[i0+1][l]-vc[i0][l]) + w2*(vc[i0+2][l]-vc[i0][l]);
  endfunction

  function automatic int covered(int t);
    int n = 0;
    for (int y = 0; y < SH; y++) for (int x = 0; x < SW; x++) if (in_tri(t, x, y)) n++;
    return n;
  endfunction

  task automatic draw(int t, int max_cycles);
    int cyc = 0;
    tri_idx[0] = 16'(3*t); tri_idx[1] = 16'(3*t+1); tri_idx[2] = 16'(3*t+2);
    tri_valid <= 1'b1;
    do @(posedge clk); while (!tri_ready);
    tri_valid <= 1'b0;
    @(posedge clk);
    while (!idle) begin @(posedge clk); cyc++; end
    $display("triangle %0d drawn in %0d cycles", t, cyc);
    check(cyc < max_cycles, $sformatf("triangle %0d took %0d cycles (bound %0d)", t, cyc, max_cycles));
  endtask

  task automatic check_region(int t, int x0, int x1, int y0, int y1, int tol);
    int bad = 0;
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) begin
      fb_rd_addr = 18'(y*SW + x);
      #1;
      if (in_tri(t, x, y)) begin
        for (int l = 0; l < 4; l++) begin
          real e; int ei, gi;
          e  = interp(t, l, x, y) * 255.0 / 256.0 * 256.0;
          ei = (e >= 255.0) ? 255 : int'($floor(e));
          gi = int'(fb_rd_color[8*l +: 8]);
          checks++;
          if (gi - ei > tol || ei - gi > tol) begin
            failures++; bad++;
            if (bad < 6) $display("FAIL: tri %0d pixel (%0d,%0d) lane %0d got %0d expected %0d", t, x, y, l, gi, ei);
          end
        end
        check(fb_rd_depth == 16'(int'(vz[3*t] * 65536.0)), $sformatf("depth at (%0d,%0d) = %h", x, y, fb_rd_depth));
      end else begin
        checks++;
        if (fb_rd_color != CLEAR_C) begin
          failures++; bad++;
          if (bad < 6) $display("FAIL: tri %0d uncovered pixel (%0d,%0d) written %h", t, x, y, fb_rd_color);
        end
      end
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #(64'd40_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- stimulus ----------------
  initial begin
    instr_t prog [24];
    int cov [3];
    int sh0, pl0, av0, sp0, apx0, hid0, cyc;
    for (int i = 0; i < 256; i++) vmem[i] = 32'h0;
    tri_idx[0] = 0; tri_idx[1] = 0; tri_idx[2] = 0;
    // triangle A: SSAL
    set_vtx(0,  40.0,  20.0, 0.5, 0.9, 0.2, 0.5, 0.0, 0.0);
    set_vtx(1, 140.0,  60.0, 0.5, 0.3, 0.8, 0.5, 1.0, 0.2);
    set_vtx(2,  60.0, 130.0, 0.5, 0.6, 0.4, 0.1, 0.3, 1.0);
    // triangle B: inside A, behind it
    set_vtx(3,  70.0,  50.0, 0.75, 0.1, 0.1, 0.1, 0.0, 0.0);
    set_vtx(4, 100.0,  60.0, 0.75, 0.1, 0.1, 0.1, 1.0, 0.0);
    set_vtx(5,  75.0,  80.0, 0.75, 0.1, 0.1, 0.1, 0.0, 1.0);
    // triangle C: SSAL off, clockwise winding
    set_vtx(6, 300.0, 300.0, 0.25, 0.2, 0.9, 0.3, 0.0, 0.0);
    set_vtx(7, 330.0, 360.0, 0.25, 0.7, 0.1, 0.6, 0.5, 1.0);
    set_vtx(8, 370.0, 310.0, 0.25, 0.4, 0.5, 0.9, 1.0, 0.0);
    for (int t = 0; t < 3; t++) cov[t] = covered(t);
    $display("covered pixels: A=%0d B=%0d C=%0d", cov[0], cov[1], cov[2]);

    for (int i = 0; i < 24; i++) prog[i] = ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0);
    prog[0]  = ins(OP_MUL, 0, 0,  4'hF, SRC_IN, 0, SRC_CONST, 0);
    prog[1]  = ins(OP_ADD, 1, 0,  4'hF, SRC_REG, 0, SRC_CONST, 1);
    prog[2]  = ins(OP_MOV, 1, 1,  4'hF, SRC_IN, 1, SRC_REG, 0);
    prog[3]  = ins(OP_MOV, 1, 2,  4'hF, SRC_IN, 2, SRC_REG, 0);
    prog[16] = ins(OP_JMP, 0, 0,  4'h0, SRC_REG, 0, SRC_REG, 0, 8'd19);
    prog[19] = ins(OP_MOV, 1, 0,  4'hF, SRC_IN, 0, SRC_REG, 0);
    prog[20] = ins(OP_MOV, 0, 14, 4'hF, SRC_IN, 2, SRC_REG, 0);
    prog[21] = ins(OP_TEX, 0, 1,  4'hF, SRC_REG, 14, SRC_REG, 0, 8'd0);
    prog[22] = ins(OP_MUL, 1, 1,  4'hF, SRC_REG, 1, SRC_IN, 1);

    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 24; i++) begin
      prog_we <= 1'b1; prog_addr <= 8'(i); prog_data <= prog[i]; @(posedge clk);
    end
    prog_we <= 1'b0;
    const_we <= 1'b1; const_addr <= 4'd0; const_data <= v4(1.0, 1.0, 1.0, 1.0); @(posedge clk);
    const_addr <= 4'd1; const_data <= v4(0.0, 0.0, 0.0, 0.0); @(posedge clk);
    const_we <= 1'b0;
    for (int i = 0; i < BWORDS; i++) begin
      bias_we <= 1'b1; bias_waddr <= BWAW'(i); bias_wdata <= 32'h5555_5555; @(posedge clk);
    end
    bias_we <= 1'b0;
    // clear: one pixel per cycle
    clear_start <= 1'b1; @(posedge clk); clear_start <= 1'b0;
    cyc = 0;
    @(posedge clk);
    while (clear_busy) begin @(posedge clk); cyc++; end
    check(cyc >= SW*SH - 2 && cyc <= SW*SH + 2, $sformatf("clear took %0d cycles", cyc));

    // A with SSAL
    draw(0, 400_000);
    check(s_vth == 3, $sformatf("vertex threads %0d", s_vth));
    check(s_sh + s_pl + s_av + s_sp == cov[0], $sformatf("A: shaded %0d + reconstructed %0d != covered %0d",
          s_sh, s_pl + s_av + s_sp, cov[0]));
    check(s_pth == s_sh, $sformatf("pixel threads %0d vs ROP shaded %0d", s_pth, s_sh));
    check(s_apx == s_pl + s_av + s_sp, "approximation-phase pixels match ROP reconstruction counts");
    check(s_pl > 0, "4x4 plane fitting used");
    check(s_av > 0, "2x2 interpolation used");
    check(s_sp > 0, "1-point splat used");
    check(s_sh < cov[0] / 2, $sformatf("SSAL shaded %0d of %0d pixels", s_sh, cov[0]));
    check(s_aps > 0, "pixel threads ran on the APS cluster");
    check(s_mis == 0, "no approximated pixel without its samples");
    $display("A: covered %0d shaded %0d plane %0d avg %0d splat %0d tiles %0d aps %0d",
             cov[0], s_sh, s_pl, s_av, s_sp, s_tiles, s_aps);
    check_region(0, 36, 144, 16, 134, 4);

    // B behind A
    sh0 = s_sh; pl0 = s_pl; av0 = s_av; sp0 = s_sp; hid0 = s_hid;
    draw(1, 200_000);
    check(s_hid - hid0 == cov[1], $sformatf("B: hidden %0d expected %0d", s_hid - hid0, cov[1]));
    check_region(0, 36, 144, 16, 134, 4);

    // C without SSAL
    ssal_en <= 1'b0;
    sh0 = s_sh; pl0 = s_pl; av0 = s_av; sp0 = s_sp; apx0 = s_apx;
    draw(2, 400_000);
    check(s_sh - sh0 == cov[2], $sformatf("C: shaded %0d expected %0d", s_sh - sh0, cov[2]));
    check(s_pl == pl0 && s_av == av0 && s_sp == sp0 && s_apx == apx0, "SSAL off: nothing reconstructed");
    check_region(2, 296, 374, 296, 364, 4);
    check(s_vth == 9, $sformatf("vertex threads %0d", s_vth));

    // texture path
    for (int k = 0; k < 4; k++) begin
      check(s_tex[k] > 0, $sformatf("cluster %0d texture requests", k));
      check(s_bias[k] > 0, $sformatf("cluster %0d LOD bias applied", k));
      check(s_l1f[k] > 0 && s_l1f[k] < s_l1r[k], $sformatf("cluster %0d L1 misses and hits (%0d/%0d)", k, s_l1f[k], s_l1r[k]));
    end
    check(s_l2f > 0 && s_l2f < s_l2r, $sformatf("L2 misses and hits (%0d/%0d)", s_l2f, s_l2r));
    check(s_ext == 4 * (s_l2f + 9 * 4), $sformatf("external words %0d", s_ext));
    check(ext_reads_tex == 4 * s_l2f, "texture words read from external memory");
    $display("tex req %0d/%0d/%0d/%0d biased %0d l1 fills %0d l2 %0d/%0d ext %0d task stalls %0d",
             s_tex[0], s_tex[1], s_tex[2], s_tex[3], s_bias[0], s_l1f[0], s_l2f, s_l2r, s_ext, s_stall);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
