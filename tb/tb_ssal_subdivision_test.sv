// tb_ssal_subdivision_test: checks the SSAL screen-space subdivision test
// on directed and random 8x4 valid maps against a reference model of the
// sampling rules: a 4x4 half tile with its four corners covered is shaded at
// the corners and plane-fitted elsewhere; otherwise each 2x2 block with a
// covered diagonal pair shades that pair (main diagonal first) and averages
// the other covered pixels, an adjacent 1x2/2x1 pair shades one pixel and
// splats the other, and a single pixel is shaded. Also checks that no
// uncovered pixel gets a role, that every approximated pixel's samples are
// shaded pixels, and that with SSAL disabled every covered pixel is shaded.
// Combinational: checked one time step after the valid map changes.
module tb_ssal_subdivision_test;
  import gpu_pkg::*;
  int checks = 0, failures = 0;
  logic ssal_en;
  logic [31:0] valid_map;
  pix_role_e role [32];

  ssal_subdivision_test dut (.ssal_en, .valid_map, .role);

  initial begin
    #(64'd1_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int ix(int c, int r); return r*8 + c; endfunction

  function automatic void model(input logic [31:0] vm, input bit en, output pix_role_e exp_r [32]);
    for (int p = 0; p < 32; p++) exp_r[p] = vm[p] ? PR_SHADE : PR_NONE;
    if (!en) return;
    for (int h = 0; h < 2; h++) begin
      int x0 = 4*h;
      if (vm[ix(x0,0)] && vm[ix(x0+3,0)] && vm[ix(x0,3)] && vm[ix(x0+3,3)]) begin
        for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
          if (!((r == 0 || r == 3) && (c == 0 || c == 3))) exp_r[ix(x0+c, r)] = PR_PLANE;
      end else begin
        for (int by = 0; by < 4; by += 2) for (int bx = x0; bx < x0 + 4; bx += 2) begin
          bit a = vm[ix(bx,by)], b = vm[ix(bx+1,by)], c = vm[ix(bx,by+1)], d = vm[ix(bx+1,by+1)];
          int n = a + b + c + d;
          if (a && d) begin
            if (b) exp_r[ix(bx+1,by)] = PR_AVG2;
            if (c) exp_r[ix(bx,by+1)] = PR_AVG2;
          end else if (b && c) begin
            if (a) exp_r[ix(bx,by)] = PR_AVG2;
            if (d) exp_r[ix(bx+1,by+1)] = PR_AVG2;
          end else if (n == 2) begin
            // adjacent pair: the later pixel in raster order copies the earlier
            if (a && b) exp_r[ix(bx+1,by)] = PR_SPLAT;
            else if (a && c) exp_r[ix(bx,by+1)] = PR_SPLAT;
            else if (b && d) exp_r[ix(bx+1,by+1)] = PR_SPLAT;
            else if (c && d) exp_r[ix(bx+1,by+1)] = PR_SPLAT;
          end
        end
      end
    end
  endfunction

  task automatic run(logic [31:0] vm, bit en);
    pix_role_e e [32];
    int nshade = 0;
    valid_map = vm; ssal_en = en;
    #1;
    model(vm, en, e);
    for (int p = 0; p < 32; p++) begin
      checks++;
      if (role[p] != e[p]) begin
        failures++;
        if (failures < 10) $display("FAIL: map %h en %0b pixel %0d role %0d expected %0d", vm, en, p, role[p], e[p]);
      end
      if (role[p] == PR_SHADE) nshade++;
    end
    // SSAL saves shading: never more threads than covered pixels
    checks++;
    if (nshade > $countones(vm)) failures++;
  endtask

  initial begin
    int plane = 0, avg = 0, splat = 0;
    run(32'hFFFF_FFFF, 1);
    checks++;
    if (!(role[0] == PR_SHADE && role[3] == PR_SHADE && role[24] == PR_SHADE && role[27] == PR_SHADE && role[1] == PR_PLANE))
      failures++;
    run(32'hFFFF_FFFF, 0);
    run(32'h0000_0000, 1);
    run(32'h0000_0303, 1);   // two full 2x2 blocks
    run(32'h0000_0201, 1);   // diagonal pair
    run(32'h0000_0003, 1);   // 1x2 pair
    run(32'h0000_0101, 1);   // 2x1 pair
    run(32'h0000_0103, 1);   // three pixels
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] vm;
      automatic int d = $urandom_range(0, 3);
      vm = $urandom;
      if (d == 1) vm = vm | $urandom;
      if (d == 2) vm = vm & $urandom;
      if (d == 3) vm = vm | ($urandom | $urandom);
      run(vm, $urandom_range(0, 7) != 0);
      for (int p = 0; p < 32; p++) begin
        if (role[p] == PR_PLANE) plane++;
        if (role[p] == PR_AVG2) avg++;
        if (role[p] == PR_SPLAT) splat++;
      end
    end
    checks++;
    if (plane == 0 || avg == 0 || splat == 0) begin failures++; $display("FAIL: a pattern never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
