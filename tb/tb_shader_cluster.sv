// tb_shader_cluster: self-checking test of one shader cluster (four unified
// shader cores sharing one texture unit, LOD bias buffer and texture L1).
//
// A four-instruction pixel program is broadcast to the cores: MOV r14 = i0,
// TEX r1 = texture(r14), ADD o0 = r1 + i1, END. All four cores are started
// together with different texel-centre coordinates (u, v = (x+0.5)/size at
// an integer LOD, so the filter returns exactly one texel), which makes
// their texture requests collide in the round-robin arbiter. The testbench
// answers the L1's line requests (the role of the texture L2) after a random
// delay from a memory model. Phase 1 (AT off) uses a hashed texture and
// checks every core's o0 lane c = byte c / 256 + i1.c. Phase 2 turns AT on
// for texture 0 with the bias map loaded with all ones and a texture whose
// texels are constant per mip level, so each result shows that the level
// was raised by one (clamped at the coarsest level). The n_tex, n_biased,
// n_l1_req counters are compared with the expected counts.
module tb_shader_cluster;
  import gpu_pkg::*;
  import tb_pkg::*;
  localparam int TL = 8;
  localparam int BW = ((((1 << (2*TL + 2)) - 1) / 3) + 15) / 16;
  localparam int BWAW = $clog2(BW);
  localparam logic [31:0] BASE2 = 32'h0020_0000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst_n = 0, prog_we = 0, const_we = 0, bias_we = 0, l1_flush = 0, at_en = 0;
  logic [7:0] prog_addr = 0, start_pc = 0;
  instr_t prog_data = '0;
  logic [3:0] const_addr = 0;
  vec4_t const_data = '0, in_data = '0;
  logic [BWAW-1:0] bias_waddr = 0;
  logic [31:0] bias_wdata = 0, tex_base = 0;
  logic [3:0] tex_log2 = 4'(TL);
  logic [3:0] in_we = 0, start = 0, busy, done;
  logic [2:0] in_addr = 0, out_addr = 0;
  vec4_t out_data [4];
  logic l2_req_valid, l2_req_ready = 0, l2_rsp_valid = 0;
  logic [31:0] l2_req_addr;
  logic [127:0] l2_rsp_data = 0;
  logic [31:0] n_tex, n_biased, n_l1_req, n_l1_fill;

  shader_cluster dut (.*);

  function automatic int lvl_off(int lv);
    int o = 0;
    for (int j = 0; j < lv; j++) o += 1 << (2 * (TL - j));
    return o;
  endfunction

  function automatic logic [31:0] memw(logic [31:0] a);
    logic [31:0] h;
    if (a >= BASE2) begin
      int off, lv;
      off = int'(a - BASE2); lv = 0;
      while (lv < TL && off >= lvl_off(lv + 1)) lv++;
      return {8'(8 * lv + 7), 8'(8 * lv + 5), 8'(8 * lv + 3), 8'(8 * lv + 1)};
    end
    h = a * 32'h9E37_79B1;
    return h ^ (h >> 13);
  endfunction

  // texture L2 model: one line request at a time, answered after 1..6 cycles
  bit pend = 0;
  logic [31:0] pend_line;
  always @(posedge clk) if (l2_req_valid && l2_req_ready) begin pend <= 1; pend_line <= l2_req_addr; end
  initial forever begin
    @(negedge clk);
    if (pend) begin
      l2_req_ready = 0; pend = 0;
      repeat ($urandom_range(0, 5)) @(negedge clk);
      l2_rsp_valid = 1;
      l2_rsp_data = {memw(pend_line*4+3), memw(pend_line*4+2), memw(pend_line*4+1), memw(pend_line*4)};
      @(negedge clk);
      l2_rsp_valid = 0;
    end
    l2_req_ready = $urandom_range(0, 1);
  end

  logic [3:0] seen_done = 0;
  always @(posedge clk) seen_done <= seen_done | done;

  initial begin
    #(64'd200_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  int exp_tex = 0, exp_biased = 0;

  // run one round: all four cores, each with its own level and texel
  task automatic round(bit phase2);
    int lv[4], x[4], y[4], add[4][4];
    @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      int s;
      lv[c] = $urandom_range(0, TL);
      s = 1 << (TL - lv[c]);
      x[c] = $urandom_range(0, s - 1); y[c] = $urandom_range(0, s - 1);
      for (int k = 0; k < 4; k++) add[c][k] = $urandom_range(0, 7);
      in_we = 4'(1 << c);
      in_addr = 0;
      in_data = v4((real'(x[c]) + 0.5) / real'(s), (real'(y[c]) + 0.5) / real'(s), real'(lv[c]), 0.0);
      @(negedge clk);
      in_addr = 1;
      in_data = v4(add[c][0], add[c][1], add[c][2], add[c][3]);
      @(negedge clk);
      in_we = 0;
      exp_tex++;
      if (phase2 && lv[c] != TL) exp_biased++;
    end
    seen_done = 0;
    start_pc = 0; start = 4'hF;
    @(negedge clk);
    start = 0;
    while (seen_done != 4'hF) @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      int l, s;
      logic [31:0] t;
      l = phase2 ? ((lv[c] + 1 > TL) ? TL : lv[c] + 1) : lv[c];
      s = 1 << (TL - l);
      if (phase2) t = memw(BASE2 + 32'(lvl_off(l)));
      else t = memw(32'(lvl_off(l) + y[c] * s + x[c]));
      out_addr = 0; #1;
      for (int k = 0; k < 4; k++)
        chk(out_data[c][k] == r2f(real'(t[k*8 +: 8]) / 256.0 + real'(add[c][k])),
            $sformatf("phase %0d core %0d lane %0d: %h (texel %h + %0d)", phase2 + 1, c, k,
                      out_data[c][k], t, add[c][k]));
    end
  endtask

  initial begin
    instr_t p[4];
    repeat (3) @(negedge clk);
    rst_n = 1;
    p[0] = ins(OP_MOV, 0, 14, 4'hF, SRC_IN, 0, SRC_REG, 0);
    p[1] = ins(OP_TEX, 0, 1, 4'hF, SRC_REG, 14, SRC_REG, 0, 8'd0);
    p[2] = ins(OP_ADD, 1, 0, 4'hF, SRC_REG, 1, SRC_IN, 1);
    p[3] = ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(i); prog_data = p[i];
    end
    for (int w = 0; w < BW; w++) begin
      @(negedge clk); prog_we = 0; bias_we = 1; bias_waddr = BWAW'(w); bias_wdata = 32'h5555_5555;
    end
    @(negedge clk); bias_we = 0;
    // phase 1: AT off, hashed texture
    tex_base = 0; at_en = 0;
    for (int r = 0; r < 150; r++) round(0);
    // phase 2: AT on, per-level constant texture
    tex_base = BASE2; at_en = 1;
    for (int r = 0; r < 50; r++) round(1);
    chk(n_tex == 32'(exp_tex), $sformatf("n_tex %0d exp %0d", n_tex, exp_tex));
    chk(n_biased == 32'(exp_biased), $sformatf("n_biased %0d exp %0d", n_biased, exp_biased));
    chk(n_l1_req == 32'(4 * exp_tex), $sformatf("n_l1_req %0d exp %0d", n_l1_req, 4 * exp_tex));
    chk(n_l1_fill > 0 && n_l1_fill <= n_l1_req, "L1 fills");
    $display("cluster: %0d texture requests, %0d biased, %0d L1 fills", exp_tex, exp_biased, n_l1_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
