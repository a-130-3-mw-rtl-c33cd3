// tb_rop_engine: checks the ROP engine at its default 512x512 buffer size.
//  * clear: clear_busy stays high for exactly 512*512 cycles (one pixel per
//    cycle) and every sampled pixel holds the clear values afterwards;
//  * shading phase: shaded pixels reach the ROP buffer through the depth
//    test (LESS) and stencil test (EQUAL); a farther pixel and a pixel with
//    a failing stencil reference are counted as hidden and leave the buffer
//    unchanged;
//  * approximation phase: for random tiles the four corners of a 4x4 half
//    tile, a 2x2 diagonal pair and a single pixel are shaded, then the
//    plane-fitted, averaged and splatted pixels are sent with approx_phase
//    high; their colours must follow the least-squares plane (within 1 LSB),
//    the rounded average and the copied sample, and the counters must
//    account for every pixel with none missing its samples;
//  * tile_clear empties the shaded colour buffer between tiles.
module tb_rop_engine;
  import gpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic depth_en = 1, stencil_en = 1, clear_start = 0, clear_busy, tile_clear = 0, approx_phase = 0;
  logic [7:0] stencil_ref = 8'h21;
  logic px_valid = 0, px_ready;
  logic [15:0] px_x = 0, px_y = 0, px_depth = 0;
  logic [31:0] px_color = 0;
  pix_role_e px_role = PR_SHADE;
  logic [17:0] rd_addr = 0;
  logic [31:0] rd_color;
  logic [15:0] rd_depth;
  logic [31:0] n_shaded, n_plane, n_avg, n_splat, n_hidden, n_missing;

  rop_engine dut (.clk, .rst_n, .depth_en, .stencil_en, .stencil_ref, .clear_color(32'hCAFE_F00D),
    .clear_depth(16'hF000), .clear_stencil(8'h21), .clear_start, .clear_busy, .tile_clear, .approx_phase,
    .px_valid, .px_ready, .px_x, .px_y, .px_depth, .px_color, .px_role, .rd_addr, .rd_color, .rd_depth,
    .n_shaded, .n_plane, .n_avg, .n_splat, .n_hidden, .n_missing);

  initial begin
    #(64'd50_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  task automatic send(int x, int y, logic [15:0] d, logic [31:0] c, pix_role_e r);
    @(negedge clk);
    px_valid = 1; px_x = 16'(x); px_y = 16'(y); px_depth = d; px_color = c; px_role = r;
    @(posedge clk); #1;
    chk(px_ready, "ROP accepts one pixel per cycle");
    @(negedge clk); px_valid = 0;
  endtask

  logic [31:0] rv;
  task automatic rd(int x, int y);
    rd_addr = 18'(y * 512 + x);
    #1;
    rv = rd_color;
  endtask

  initial begin
    int cyc, hid0, nshade, napprox;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); clear_start = 1; @(negedge clk); clear_start = 0;
    cyc = 1;
    while (clear_busy) begin @(negedge clk); cyc++; end
    chk(cyc == 512*512 + 1, $sformatf("clear took %0d cycles", cyc));
    for (int n = 0; n < 200; n++) begin
      rd_addr = 18'($urandom); #1;
      chk(rd_color == 32'hCAFE_F00D && rd_depth == 16'hF000, "cleared pixel");
    end
    // visibility
    send(10, 10, 16'h1000, 32'h1111_1111, PR_SHADE);
    rd(10, 10); chk(rv == 32'h1111_1111, "nearer pixel written");
    hid0 = n_hidden;
    send(10, 10, 16'h2000, 32'h2222_2222, PR_SHADE);
    rd(10, 10); chk(rv == 32'h1111_1111 && n_hidden == hid0 + 1, "farther pixel hidden");
    stencil_ref = 8'h22;
    send(11, 10, 16'h0100, 32'h3333_3333, PR_SHADE);
    rd(11, 10); chk(rv == 32'hCAFE_F00D && n_hidden == hid0 + 2, "stencil mismatch hidden");
    stencil_ref = 8'h21;
    nshade = n_shaded; napprox = 0;
    // approximation on random tiles
    for (int n = 0; n < 100; n++) begin
      automatic int tx = $urandom_range(4, 60), ty = $urandom_range(4, 120);
      automatic int h = $urandom_range(0, 1);
      automatic int x0 = tx*8 + 4*h, y0 = ty*4;
      automatic int ox = tx*8 + 4*(1-h);                 // the other half: 2x2 blocks
      logic [7:0] ci [4];
      logic [31:0] a, b, s;
      @(negedge clk); tile_clear = 1; @(negedge clk); tile_clear = 0;
      for (int k = 0; k < 4; k++) begin
        ci[k] = 8'($urandom_range(0, 255));
        send(x0 + (k & 1)*3, y0 + (k >> 1)*3, 16'h0800, {4{ci[k]}}, PR_SHADE);
      end
      a = $urandom; b = $urandom; s = $urandom;
      send(ox, y0, 16'h0800, a, PR_SHADE);          // diagonal of block (0,0) of the other half
      send(ox + 1, y0 + 1, 16'h0800, b, PR_SHADE);
      send(ox + 2, y0 + 2, 16'h0800, s, PR_SHADE);  // single sample of block (1,1)
      approx_phase = 1;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        if (!((r == 0 || r == 3) && (c == 0 || c == 3))) begin
          send(x0 + c, y0 + r, 16'h0800, 32'h0, PR_PLANE);
          napprox++;
        end
      send(ox + 1, y0, 16'h0800, 32'h0, PR_AVG2);
      send(ox + 3, y0 + 2, 16'h0800, 32'h0, PR_SPLAT);
      napprox += 2;
      approx_phase = 0;
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
        if (!((r == 0 || r == 3) && (c == 0 || c == 3))) begin
          real pa, pb, pc, f;
          automatic int fe, g;
          pa = (real'(ci[1]) + ci[3] - ci[0] - ci[2]) / 6.0;
          pb = (real'(ci[2]) + ci[3] - ci[0] - ci[1]) / 6.0;
          pc = (real'(ci[0]) + ci[1] + ci[2] + ci[3]) / 4.0 - 1.5*pa - 1.5*pb;
          f = pa*c + pb*r + pc;
          fe = (f < 0) ? 0 : (f > 255) ? 255 : int'($floor(f + 0.5));
          rd(x0 + c, y0 + r); g = rv & 32'hFF;
          chk(g - fe <= 1 && fe - g <= 1, $sformatf("plane pixel (%0d,%0d) = %0d expected %0d", c, r, g, fe));
        end
      rd(ox + 1, y0);
      for (int ch = 0; ch < 4; ch++)
        chk(rv[8*ch +: 8] == 8'((int'(a[8*ch +: 8]) + int'(b[8*ch +: 8]) + 1) / 2), "2x2 average");
      rd(ox + 3, y0 + 2); chk(rv == s, "one-point splat copies the sample");
    end
    chk(n_shaded - nshade == 100 * 7, "shaded pixel count");
    chk(n_plane == 1200 && n_avg == 100 && n_splat == 100, $sformatf("plane %0d avg %0d splat %0d", n_plane, n_avg, n_splat));
    chk(n_missing == 0, "no approximated pixel without samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
