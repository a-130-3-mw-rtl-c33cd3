// tb_interior_traversal: checks the interior traversal on random triangles
// and tiles. The 32-bit valid map (bit r*8+c) must equal an independent
// inside test of every tile pixel (all edges >= 0, on screen), and the four
// leftmost-column values must equal M*x + N*y + C at the column's pixels.
// Combinational: checked one time step after the inputs change.
module tb_interior_traversal;
  int checks = 0, failures = 0;
  logic [15:0] tile_x, tile_y;
  logic signed [31:0] alpha [3], beta [3], gamma [3];
  logic signed [47:0] plane_m, plane_n, plane_c;
  logic [31:0] valid_map;
  logic signed [47:0] left_col [4];

  interior_traversal dut (.tile_x, .tile_y, .alpha, .beta, .gamma, .plane_m, .plane_n, .plane_c, .valid_map, .left_col);

  initial begin
    #(64'd1_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int x [3], y [3];
    int covered_tiles = 0;
    for (int n = 0; n < 3000; n++) begin
      int a2;
      for (int i = 0; i < 3; i++) begin x[i] = $urandom_range(0, 80); y[i] = $urandom_range(0, 60); end
      a2 = (x[1]-x[0])*(y[2]-y[0]) - (x[2]-x[0])*(y[1]-y[0]);
      for (int k = 0; k < 3; k++) begin
        automatic int q = (k + 1) % 3;
        // e = (x_q - x_k)(py - y_k) - (y_q - y_k)(px - x_k), inside positive
        alpha[k] = -(y[q] - y[k]); beta[k] = x[q] - x[k];
        gamma[k] = (y[q] - y[k]) * x[k] - (x[q] - x[k]) * y[k];
        if (a2 < 0) begin alpha[k] = -alpha[k]; beta[k] = -beta[k]; gamma[k] = -gamma[k]; end
      end
      plane_m = 48'(signed'($urandom)); plane_n = 48'(signed'($urandom)); plane_c = 48'(signed'($urandom)) <<< 8;
      tile_x = 16'($urandom_range(0, 10)); tile_y = 16'($urandom_range(0, 15));
      if (n % 500 == 0) begin tile_x = 16'd63; tile_y = 16'd127; end
      #1;
      for (int r = 0; r < 4; r++) begin
        for (int c = 0; c < 8; c++) begin
          automatic int px = tile_x*8 + c, py = tile_y*4 + r;
          automatic bit in = (px < 512) && (py < 512);
          for (int k = 0; k < 3; k++) begin
            automatic int q = (k + 1) % 3;
            automatic longint e = longint'(x[q]-x[k])*(py-y[k]) - longint'(y[q]-y[k])*(px-x[k]);
            if (a2 < 0) e = -e;
            if (e < 0) in = 0;
          end
          checks++;
          if (valid_map[r*8 + c] != in) begin
            failures++;
            if (failures < 4) $display("FAIL: tile (%0d,%0d) pixel (%0d,%0d) valid %0b expected %0b tri %0d,%0d %0d,%0d %0d,%0d a %0d %0d %0d", tile_x, tile_y, c, r, valid_map[r*8+c], in, x[0], y[0], x[1], y[1], x[2], y[2], alpha[0], beta[0], gamma[0]);
          end
        end
        checks++;
        if (left_col[r] != plane_m * (tile_x*8) + plane_n * (tile_y*4 + r) + plane_c) begin
          failures++;
          if (failures < 10) $display("FAIL: left column value row %0d", r);
        end
      end
      if (valid_map != 0) covered_tiles++;
    end
    checks++;
    if (covered_tiles < 100) begin failures++; $display("FAIL: too few covered tiles %0d", covered_tiles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
