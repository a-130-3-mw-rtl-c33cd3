// tb_raster: checks the tile-based raster (triangle setup, tile traversal,
// interior traversal, interpolation unit, plane equation and tile scalar
// value SRAMs) on random triangles with nine scalars each (depth and two
// vec4 varyings, Q16.16).
// Checks: the set of emitted pixels equals an independent per-pixel inside
// test over the whole screen, with no duplicates; every scalar of every
// pixel matches barycentric interpolation of the vertex values within
// 2^-9; with SSAL off every pixel is a shaded one, with SSAL on every pixel
// has a role and fewer than all are shaded on large triangles; pix_last
// marks one pixel per tile and the number of tiles equals tile_count's
// increase; tri_done pulses once per triangle, also for a culled one.
// Rate: inside a tile the covered pixels leave one per cycle while
// pix_ready is high (checked cycle by cycle); with random pix_ready the
// output must still be complete.
module tb_raster;
  import gpu_pkg::*;
  localparam int NS = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ssal_en = 0, tri_valid = 0, tri_ready, pix_valid, pix_ready = 1, pix_last, tri_done;
  logic signed [15:0] vx [3], vy [3];
  logic signed [31:0] vs [3][NS];
  logic [15:0] pix_x, pix_y;
  pix_role_e pix_role;
  logic signed [31:0] pix_scal [NS];
  logic [31:0] tile_count;

  raster #(.NS(NS), .SCREEN_W(512), .SCREEN_H(512)) dut (.clk, .rst_n, .ssal_en, .tri_valid, .tri_ready,
    .vx, .vy, .vs, .pix_valid, .pix_ready, .pix_x, .pix_y, .pix_role, .pix_last, .pix_scal, .tri_done, .tile_count);

  initial begin
    #(64'd200_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  bit seen [512][512];

  initial begin
    int nroles [5];
    for (int i = 0; i < 3; i++) begin vx[i] = 0; vy[i] = 0; for (int k = 0; k < NS; k++) vs[i][k] = 0; end
    for (int r = 0; r < 5; r++) nroles[r] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int npix, nlast, ndone, cov, tc0, cyc, nshade;
      real a2;
      automatic bit backp = (n % 4 == 3);
      automatic int span = (n % 5 == 0) ? 120 : 40;
      ssal_en = (n % 2 == 1);
      for (int i = 0; i < 3; i++) begin
        vx[i] = 16'($urandom_range(0, span) + 16 * (n % 8));
        vy[i] = 16'($urandom_range(0, span) + 20 * (n % 5));
        for (int k = 0; k < NS; k++) vs[i][k] = 32'($urandom_range(0, 1 << 17));
      end
      if (n == 7) begin vx[2] = vx[0]; vy[2] = vy[0]; end   // culled
      a2 = real'(vx[1]-vx[0])*real'(vy[2]-vy[0]) - real'(vx[2]-vx[0])*real'(vy[1]-vy[0]);
      for (int y = 0; y < 512; y++) for (int x = 0; x < 512; x++) seen[y][x] = 0;
      tc0 = tile_count;
      @(negedge clk); tri_valid = 1;
      while (!tri_ready) @(negedge clk);
      @(negedge clk); tri_valid = 0;
      npix = 0; nlast = 0; ndone = 0; cyc = 0; nshade = 0;
      while (ndone == 0 && cyc < 2_000_000) begin
        pix_ready = backp ? ($urandom_range(0, 2) != 0) : 1'b1;
        @(posedge clk);
        if (tri_done) ndone++;
        if (pix_valid && pix_ready) begin
          automatic int x = pix_x, y = pix_y;
          automatic real w1, w2;
          chk(!seen[y][x], $sformatf("pixel (%0d,%0d) twice", x, y));
          seen[y][x] = 1;
          npix++;
          if (pix_last) nlast++;
          nroles[pix_role]++;
          if (pix_role == PR_SHADE) nshade++;
          if (!ssal_en) chk(pix_role == PR_SHADE, "SSAL off: every pixel shaded");
          else chk(pix_role != PR_NONE, "covered pixel has a role");
          w1 = ((real'(x)-vx[0])*(vy[2]-vy[0]) - (vx[2]-vx[0])*(real'(y)-vy[0])) / a2;
          w2 = ((vx[1]-vx[0])*(real'(y)-vy[0]) - (real'(x)-vx[0])*(vy[1]-vy[0])) / a2;
          for (int k = 0; k < NS; k++) begin
            automatic real e = (vs[0][k] + w1*(vs[1][k]-vs[0][k]) + w2*(vs[2][k]-vs[0][k])) / 65536.0;
            automatic real g = real'(pix_scal[k]) / 65536.0;
            chk(g - e < 1.0/512 && e - g < 1.0/512,
                $sformatf("tri %0d pixel (%0d,%0d) scalar %0d = %f expected %f", n, x, y, k, g, e));
          end
          // one pixel per cycle inside a tile
          if (!pix_last && !backp) begin
            @(negedge clk);
            chk(pix_valid, "next pixel of the tile follows in the next cycle");
            cyc++;
            continue;
          end
        end
        @(negedge clk); cyc++;
      end
      chk(ndone == 1, "tri_done pulsed");
      cov = 0;
      if (a2 != 0)
        for (int y = 0; y < 512; y++) for (int x = 0; x < 512; x++) begin
          automatic bit in = 1;
          for (int k = 0; k < 3; k++) begin
            automatic int q = (k + 1) % 3;
            automatic real e = real'(vx[q]-vx[k])*real'(y-vy[k]) - real'(vy[q]-vy[k])*real'(x-vx[k]);
            if (a2 < 0) e = -e;
            if (e < 0) in = 0;
          end
          if (in) cov++;
          if (in != seen[y][x]) chk(0, $sformatf("tri %0d pixel (%0d,%0d) coverage %0b expected %0b", n, x, y, seen[y][x], in));
        end
      chk(npix == cov, $sformatf("tri %0d: %0d pixels, %0d covered", n, npix, cov));
      chk(nlast == int'(tile_count) - tc0, "pix_last once per tile, matching tile_count");
      if (ssal_en && cov > 200) chk(nshade < cov, "SSAL shades fewer pixels than covered");
      repeat (3) @(negedge clk);
    end
    chk(nroles[PR_PLANE] > 0 && nroles[PR_AVG2] > 0 && nroles[PR_SPLAT] > 0, "all SSAL patterns occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
