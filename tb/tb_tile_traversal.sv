// tb_tile_traversal: checks the first-level tile scan on random triangles
// (both windings, some crossing the screen edge). Every 8x4 tile holding at
// least one covered pixel (independent per-pixel test) must be emitted,
// no tile may be emitted twice or outside the bounding box, and the first
// tile must be in the tile row of the top vertex. Rate: the scan tests one
// tile per cycle, so with tile_ready held high the whole scan must finish
// within (tiles in the bounding box + 2 per tile row + 2) cycles plus one
// emit cycle per emitted tile. A second pass drives tile_ready randomly.
module tb_tile_traversal;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start = 0, tile_valid, tile_ready = 1, done;
  logic signed [31:0] alpha [3], beta [3], gamma [3];
  logic signed [15:0] xmin, xmax, ymin, ymax, top_x;
  logic [15:0] tile_x, tile_y;

  tile_traversal #(.SCREEN_W(512), .SCREEN_H(512)) dut (.clk, .rst_n, .start, .alpha, .beta, .gamma,
    .xmin, .xmax, .ymin, .ymax, .top_x, .tile_valid, .tile_ready, .tile_x, .tile_y, .done);

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

  initial begin
    int x [3], y [3];
    bit emitted [64][128];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int a2, t, cyc, nemit, bbt, rows, tx0, tx1, ty0, ty1, first_ty;
      automatic bit backp = n >= 150;
      automatic int span = (n % 3 == 0) ? 200 : 60;
      for (int i = 0; i < 3; i++) begin
        x[i] = $urandom_range(0, span) + ((n % 7 == 0) ? 470 : 0);
        y[i] = $urandom_range(0, span) + ((n % 11 == 0) ? 470 : 0);
      end
      a2 = (x[1]-x[0])*(y[2]-y[0]) - (x[2]-x[0])*(y[1]-y[0]);
      if (a2 == 0) continue;
      for (int k = 0; k < 3; k++) begin
        automatic int q = (k + 1) % 3;
        alpha[k] = -(y[q] - y[k]); beta[k] = x[q] - x[k];
        gamma[k] = (y[q] - y[k]) * x[k] - (x[q] - x[k]) * y[k];
        if (a2 < 0) begin alpha[k] = -alpha[k]; beta[k] = -beta[k]; gamma[k] = -gamma[k]; end
      end
      t = 0;
      for (int i = 1; i < 3; i++) if (y[i] < y[t] || (y[i] == y[t] && x[i] < x[t])) t = i;
      xmin = 16'(x[0] < x[1] ? (x[0] < x[2] ? x[0] : x[2]) : (x[1] < x[2] ? x[1] : x[2]));
      xmax = 16'(x[0] > x[1] ? (x[0] > x[2] ? x[0] : x[2]) : (x[1] > x[2] ? x[1] : x[2]));
      ymin = 16'(y[0] < y[1] ? (y[0] < y[2] ? y[0] : y[2]) : (y[1] < y[2] ? y[1] : y[2]));
      ymax = 16'(y[0] > y[1] ? (y[0] > y[2] ? y[0] : y[2]) : (y[1] > y[2] ? y[1] : y[2]));
      top_x = 16'(x[t]);
      tx0 = (xmin > 511 ? 511 : xmin) >>> 3; tx1 = (xmax > 511 ? 511 : xmax) >>> 3;
      ty0 = (ymin > 511 ? 511 : ymin) >>> 2; ty1 = (ymax > 511 ? 511 : ymax) >>> 2;
      bbt = (tx1 - tx0 + 1) * (ty1 - ty0 + 1); rows = ty1 - ty0 + 1;
      for (int i = 0; i < 64; i++) for (int j = 0; j < 128; j++) emitted[i][j] = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 0; nemit = 0; first_ty = -1;
      while (!done && cyc < 100000) begin
        tile_ready = backp ? $urandom_range(0, 1) : 1'b1;
        @(posedge clk);
        if (tile_valid && tile_ready) begin
          chk(!emitted[tile_x][tile_y], $sformatf("tile (%0d,%0d) emitted twice", tile_x, tile_y));
          chk(tile_x >= tx0 && tile_x <= tx1 && tile_y >= ty0 && tile_y <= ty1, "tile inside bounding box");
          if (first_ty < 0) first_ty = tile_y;
          emitted[tile_x][tile_y] = 1;
          nemit++;
        end
        @(negedge clk); cyc++;
      end
      chk(done, "scan finished");
      if (y[t] < 512 && x[t] < 512) chk(first_ty == (y[t] >>> 2), $sformatf("scan starts in tile row %0d, top vertex (%0d,%0d)", first_ty, x[t], y[t]));
      if (!backp)
        chk(cyc <= bbt + 2*rows + 2 + nemit, $sformatf("scan took %0d cycles for %0d bbox tiles", cyc, bbt));
      // every covered tile was emitted
      for (int ty = ty0; ty <= ty1; ty++) for (int tx = tx0; tx <= tx1; tx++) begin
        automatic bit cov = 0;
        for (int r = 0; r < 4; r++) for (int c = 0; c < 8; c++) begin
          automatic int px = tx*8 + c, py = ty*4 + r;
          automatic bit in = 1;
          for (int k = 0; k < 3; k++) if (alpha[k]*px + beta[k]*py + gamma[k] < 0) in = 0;
          if (in) cov = 1;
        end
        if (cov) chk(emitted[tx][ty], $sformatf("covered tile (%0d,%0d) missed (tri %0d)", tx, ty, n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
