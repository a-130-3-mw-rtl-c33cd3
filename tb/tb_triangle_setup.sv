// tb_triangle_setup: checks the triangle setup unit on random triangles of
// both windings. Edge equations: for random pixels the sign test
// alpha*x + beta*y + gamma >= 0 on all edges must agree with an independent
// orientation test. Bounding box and top vertex (smallest y, then smallest
// x) are compared exactly. Plane equations: each scalar's {M, N, C} written
// to the plane equation SRAM port, evaluated at the three vertices, must
// reproduce the vertex values (within 2^-10 plus a relative 2^-16), and the
// SRAM writes must come one per cycle for scalars 0..NS-1. Zero-area
// triangles must be culled. Latency: done must come exactly
// 41 + NS cycles after acceptance (41-cycle reciprocal, then one
// scalar per cycle); the source gives no number for this, it is this
// design's schedule.
module tb_triangle_setup;
  localparam int NS = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_ready, done, culled, pe_we;
  logic signed [15:0] vx [3], vy [3];
  logic signed [31:0] vs [3][NS];
  logic signed [31:0] alpha [3], beta [3], gamma [3];
  logic signed [15:0] xmin, xmax, ymin, ymax, top_x;
  logic [3:0] pe_addr;
  logic [143:0] pe_data;

  triangle_setup #(.NS(NS)) dut (.clk, .rst_n, .in_valid, .in_ready, .vx, .vy, .vs, .done, .culled,
    .alpha, .beta, .gamma, .xmin, .xmax, .ymin, .ymax, .top_x, .pe_we, .pe_addr, .pe_data);

  initial begin
    #(64'd10_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string m);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", m); end
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin vx[i] = 0; vy[i] = 0; for (int k = 0; k < NS; k++) vs[i][k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int cyc, nwr, t;
      real area;
      automatic bit degenerate = (n % 25 == 24);
      for (int i = 0; i < 3; i++) begin
        vx[i] = 16'($urandom_range(0, 511)); vy[i] = 16'($urandom_range(0, 511));
        for (int k = 0; k < NS; k++) vs[i][k] = 32'(signed'($urandom_range(0, 1 << 18)) - (1 << 17));
      end
      if (degenerate) begin vx[2] = vx[0]; vy[2] = vy[0]; end
      area = real'(vx[1]-vx[0])*real'(vy[2]-vy[0]) - real'(vx[2]-vx[0])*real'(vy[1]-vy[0]);
      @(negedge clk); in_valid = 1;
      @(posedge clk); #1; in_valid = 0;
      cyc = 0; nwr = 0;
      while (!done) begin
        if (pe_we) begin
          real m, nn, c, e, sv;
          m  = real'(signed'(pe_data[143:96])) / 16777216.0;
          nn = real'(signed'(pe_data[95:48])) / 16777216.0;
          c  = real'(signed'(pe_data[47:0])) / 16777216.0;
          chk(pe_addr == 4'(nwr), "plane SRAM writes in scalar order, one per cycle");
          for (int i = 0; i < 3; i++) begin
            e  = m * vx[i] + nn * vy[i] + c;
            sv = real'(vs[i][nwr]) / 65536.0;
            chk((e - sv) < 1.0/1024 + (sv < 0 ? -sv : sv) / 65536.0 && (sv - e) < 1.0/1024 + (sv < 0 ? -sv : sv) / 65536.0,
                $sformatf("tri %0d scalar %0d vertex %0d plane gives %f expected %f", n, nwr, i, e, sv));
          end
          nwr++;
        end
        @(posedge clk); #1; cyc++;
        if (cyc > 200) break;
      end
      if (pe_we) begin nwr++; end
      if (degenerate) begin
        chk(culled && cyc == 0, "zero-area triangle culled at once");
        continue;
      end
      chk(!culled, "non-degenerate triangle not culled");
      chk(cyc == 41 + NS, $sformatf("setup latency %0d cycles, expected %0d", cyc, 41 + NS));
      chk(nwr == NS, $sformatf("%0d plane writes", nwr));
      t = 0;
      for (int i = 1; i < 3; i++) if (vy[i] < vy[t] || (vy[i] == vy[t] && vx[i] < vx[t])) t = i;
      chk(top_x == vx[t], "top vertex");
      chk(xmin == ((vx[0] < vx[1] ? vx[0] : vx[1]) < vx[2] ? (vx[0] < vx[1] ? vx[0] : vx[1]) : vx[2]), "xmin");
      chk(ymax == ((vy[0] > vy[1] ? vy[0] : vy[1]) > vy[2] ? (vy[0] > vy[1] ? vy[0] : vy[1]) : vy[2]), "ymax");
      for (int p = 0; p < 200; p++) begin
        automatic int px = $urandom_range(0, 511), py = $urandom_range(0, 511);
        automatic bit ref_in = 1, dut_in = 1;
        for (int k = 0; k < 3; k++) begin
          automatic int q = (k + 1) % 3;
          automatic real e = real'(vx[q]-vx[k])*real'(py-vy[k]) - real'(vy[q]-vy[k])*real'(px-vx[k]);
          if (area < 0) e = -e;
          if (e < 0) ref_in = 0;
          if (alpha[k] * px + beta[k] * py + gamma[k] < 0) dut_in = 0;
        end
        chk(ref_in == dut_in, $sformatf("edge test at (%0d,%0d)", px, py));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
