// tb_ssal_reconstruction: checks the screen-space reconstruction unit of
// the ROP. For random tiles it writes shaded RGBA8 colours at the sample
// positions of each pattern and queries the approximated pixels:
//  * 4x4 plane fitting: compared with a real-number least-squares fit of a
//    plane to the four corner samples, evaluated at the pixel (within 1 LSB
//    for rounding, clamped to 0..255);
//  * 2x2 interpolation: the rounded average of the two samples of the block;
//  * one-point splat: the block's single sample;
//  * q_ok: high only when the samples the role needs are present, and low
//    for every role after tile_clear.
// Writes take one clock; queries are combinational.
module tb_ssal_reconstruction;
  import gpu_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic tile_clear = 0, wr_en = 0, q_ok;
  logic [4:0] wr_idx = 0, q_idx = 0;
  logic [31:0] wr_color = 0, q_color;
  pix_role_e q_role = PR_NONE;

  ssal_reconstruction dut (.clk, .rst_n, .tile_clear, .wr_en, .wr_idx, .wr_color, .q_idx, .q_role, .q_color, .q_ok);

  initial begin
    #(64'd5_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  task automatic wr(int idx, logic [31:0] c);
    @(negedge clk); wr_en = 1; wr_idx = 5'(idx); wr_color = c;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic clr();
    @(negedge clk); tile_clear = 1; @(negedge clk); tile_clear = 0;
  endtask

  initial begin
    logic [31:0] cc [4];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      automatic int h = $urandom_range(0, 1);
      // ---- plane fitting on half tile h ----
      clr();
      q_role = PR_PLANE; q_idx = 5'(8 + 4*h + 1); #1;
      chk(!q_ok, "plane query without samples");
      for (int k = 0; k < 4; k++) begin
        cc[k] = $urandom;
        if (n % 3 == 0) cc[k] = {4{8'($urandom_range(100, 140))}};
        wr(((k >> 1) * 3) * 8 + 4*h + (k & 1) * 3, cc[k]);
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) begin
        q_role = PR_PLANE; q_idx = 5'(r*8 + 4*h + c); #1;
        chk(q_ok, "plane samples present");
        for (int ch = 0; ch < 4; ch++) begin
          real i0, i1, i2, i3, a, b, c0, f;
          int fe, g;
          i0 = cc[0][8*ch +: 8]; i1 = cc[1][8*ch +: 8]; i2 = cc[2][8*ch +: 8]; i3 = cc[3][8*ch +: 8];
          // least squares over the corners (0,0),(3,0),(0,3),(3,3)
          a  = ((i1 + i3) - (i0 + i2)) / 6.0;
          b  = ((i2 + i3) - (i0 + i1)) / 6.0;
          c0 = (i0 + i1 + i2 + i3) / 4.0 - 1.5*a - 1.5*b;
          f  = a*c + b*r + c0;
          fe = (f < 0) ? 0 : (f > 255) ? 255 : int'($floor(f + 0.5));
          g  = q_color[8*ch +: 8];
          chk(g - fe <= 1 && fe - g <= 1, $sformatf("plane (%0d,%0d) ch%0d got %0d expected %0d", c, r, ch, g, fe));
        end
      end
      // ---- 2x2 average and splat ----
      clr();
      begin
        automatic int bx = 2 * $urandom_range(0, 3), by = 2 * $urandom_range(0, 1);
        automatic int p00 = by*8 + bx, p11 = (by+1)*8 + bx + 1, p10 = by*8 + bx + 1;
        cc[0] = $urandom; cc[1] = $urandom;
        wr(p00, cc[0]);
        q_role = PR_SPLAT; q_idx = 5'(p10); #1;
        chk(q_ok && q_color == cc[0], "one-point splat forwards the sample");
        q_role = PR_AVG2; #1;
        chk(!q_ok, "average needs two samples");
        wr(p11, cc[1]);
        q_role = PR_AVG2; q_idx = 5'(p10); #1;
        chk(q_ok, "average samples present");
        for (int ch = 0; ch < 4; ch++)
          chk(int'(q_color[8*ch +: 8]) == (int'(cc[0][8*ch +: 8]) + int'(cc[1][8*ch +: 8]) + 1) / 2,
              $sformatf("2x2 average ch%0d", ch));
        q_role = PR_SPLAT; #1;
        chk(!q_ok, "splat needs exactly one sample");
      end
    end
    clr();
    q_role = PR_AVG2; q_idx = 5'd1; #1;
    chk(!q_ok, "tile_clear empties the shaded colour buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
