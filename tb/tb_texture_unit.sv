// tb_texture_unit: self-checking test of the per-cluster texture unit.
//
// The testbench plays the texture L1 cache (a word memory whose content is
// a hash of the address, answered after 1..4 cycles with random stalls on
// req_ready) and the LOD bias buffer (registered: the 2-bit bias, a hash of
// level and texel, appears one cycle after bias_rd_en). Random requests use
// exactly representable coordinates u, v = k/1024 and LODs m/256 (some
// negative or beyond the coarsest level) on textures of 4x4 to 64x64 with
// AT on or off and texture ID 0 or not. Each response is compared with a
// reference model: LOD clamp, bias added to the integer LOD for texture 0
// with AT on, texel coordinate u*size-0.5 with wrap, bilinear blend of four
// texels with 8-bit weights and, when the LOD has a fraction, a linear blend
// with the next coarser level (eight texels). Also checked: the number of L1
// reads per request (4 or 8), the addresses being inside the mip chain, the
// n_tex/n_biased counters and a constant texture returning the constant.
module tb_texture_unit;
  import gpu_pkg::*;
  import tb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n = 0, at_en = 0;
  logic [31:0] tex_base = 0;
  logic [3:0]  tex_log2 = 4;
  logic        req_valid = 0, req_ready;
  logic [7:0]  req_id = 0;
  vec4_t       req_coord = '0;
  logic        rsp_valid;
  logic [31:0] rsp_rgba;
  logic        bias_rd_en;
  logic [3:0]  bias_level;
  logic [15:0] bias_x, bias_y;
  logic [1:0]  bias_in = 0;
  logic        l1_req_valid, l1_req_ready = 0;
  logic [31:0] l1_req_addr;
  logic        l1_rsp_valid = 0;
  logic [31:0] l1_rsp_data = 0;
  logic [31:0] n_tex, n_biased;
  bit          const_mode = 0;
  int          l1_reads = 0;

  texture_unit dut (.*);

  function automatic logic [31:0] texel_at(logic [31:0] a);
    logic [31:0] h;
    if (const_mode) return 32'h80C0_4020;
    h = a * 32'h9E37_79B1;
    return h ^ (h >> 15) ^ (a << 7);
  endfunction

  function automatic logic [1:0] bias_of(int lv, int x, int y);
    logic [31:0] h;
    h = 32'(lv * 7919 + x * 131 + y * 977) * 32'h85EB_CA6B;
    return h[17:16];
  endfunction

  // LOD bias buffer model
  always @(posedge clk) if (bias_rd_en) bias_in <= bias_of(int'(bias_level), int'(bias_x), int'(bias_y));

  // L1 cache model: a read accepted at a clock edge is answered 1..4 cycles later
  logic [31:0] pend_addr;
  bit          pend = 0;
  always @(posedge clk) if (l1_req_valid && l1_req_ready) begin pend <= 1; pend_addr <= l1_req_addr; l1_reads++; end
  initial begin
    forever begin
      @(negedge clk);
      if (pend) begin
        l1_req_ready = 0;
        pend = 0;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        l1_rsp_valid = 1; l1_rsp_data = texel_at(pend_addr);
        @(negedge clk);
        l1_rsp_valid = 0;
      end
      l1_req_ready = ($urandom_range(0, 3) != 0);
    end
  end

  // address checker: every read is inside the texture's mip chain
  always @(posedge clk) if (l1_req_valid && l1_req_ready) begin
    longint total;
    total = 0;
    for (int j = 0; j <= int'(tex_log2); j++) total += longint'(1) << (2 * (int'(tex_log2) - j));
    checks++;
    if (l1_req_addr < tex_base || longint'(l1_req_addr - tex_base) >= total) begin
      failures++;
      $display("FAIL: L1 address %h outside texture at %h", l1_req_addr, tex_base);
    end
  end

  initial begin
    #(64'd100_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int lvl_off(int L, int lv);
    int o = 0;
    for (int j = 0; j < lv; j++) o += 1 << (2 * (L - j));
    return o;
  endfunction

  function automatic void tcoord(longint q, int sl, output int i, output int f);
    longint tq;
    tq = q * (longint'(1) << sl) - 32768;
    i = int'(tq >>> 16) & ((1 << sl) - 1);
    f = int'(tq >>> 8) & 255;
  endfunction

  function automatic int bil(logic [31:0] t[4], int ch, int wx, int wy);
    int a, b, c, d, top, bot;
    a = int'(t[0][ch*8 +: 8]); b = int'(t[1][ch*8 +: 8]);
    c = int'(t[2][ch*8 +: 8]); d = int'(t[3][ch*8 +: 8]);
    top = a * (256 - wx) + b * wx;
    bot = c * (256 - wx) + d * wx;
    return ((top * (256 - wy) + bot * wy) >> 16) & 255;
  endfunction

  function automatic int level_ch(int L, int base, int lv, longint uq, longint vq, int ch);
    int sl, xi, fx, yi, fy, sz;
    logic [31:0] t[4];
    sl = L - lv; sz = 1 << sl;
    tcoord(uq, sl, xi, fx);
    tcoord(vq, sl, yi, fy);
    for (int k = 0; k < 4; k++) begin
      int xx, yy;
      xx = (xi + (k & 1)) & (sz - 1);
      yy = (yi + (k >> 1)) & (sz - 1);
      t[k] = texel_at(32'(base + lvl_off(L, lv) + yy * sz + xx));
    end
    return bil(t, ch, fx, fy);
  endfunction

  int exp_biased;
  function automatic logic [31:0] model(int L, int base, bit at, int id, int ku, int kv, int m, output int nreads);
    longint uq, vq, lq;
    int li, lf, l1;
    bit two;
    logic [31:0] r;
    uq = longint'(ku) * 64; vq = longint'(kv) * 64; lq = longint'(m) * 256;
    if (lq < 0) begin li = 0; lf = 0; end
    else if (lq >= longint'(L) * 65536) begin li = L; lf = 0; end
    else begin li = int'(lq >> 16); lf = int'(lq >> 8) & 255; end
    if (at && id == 0) begin
      int bx, bf, by, b;
      tcoord(uq, L - li, bx, bf);
      tcoord(vq, L - li, by, bf);
      b = int'(bias_of(li, bx, by));
      if (b != 0 && li != L) exp_biased++;
      li = (li + b > L) ? L : li + b;
    end
    two = lf != 0 && li != L;
    l1 = (li == L) ? li : li + 1;
    nreads = two ? 8 : 4;
    for (int ch = 0; ch < 4; ch++) begin
      int c0, c1;
      c0 = level_ch(L, base, li, uq, vq, ch);
      c1 = level_ch(L, base, l1, uq, vq, ch);
      r[ch*8 +: 8] = two ? 8'((c0 * (256 - lf) + c1 * lf) >> 8) : 8'(c0);
    end
    return r;
  endfunction

  initial begin
    int n_req;
    n_req = 0; exp_biased = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int L = $urandom_range(2, 6);
      automatic int base = $urandom_range(0, 1 << 20);
      automatic bit at = $urandom_range(0, 1);
      automatic int id = ($urandom_range(0, 2) == 0) ? 3 : 0;
      automatic int ku = $urandom_range(0, 1023);
      automatic int kv = $urandom_range(0, 1023);
      automatic int m = int'($urandom_range(0, (L + 2) * 256)) - 128;
      automatic int nreads, nbefore, cyc;
      logic [31:0] exp;
      const_mode = (n % 10) == 9;
      tex_base = 32'(base); tex_log2 = 4'(L); at_en = at;
      exp = model(L, base, at, id, ku, kv, m, nreads);
      if (const_mode) exp = 32'h80C0_4020;
      while (!req_ready) @(negedge clk);
      nbefore = l1_reads;
      req_valid = 1; req_id = 8'(id);
      req_coord = v4(real'(ku) / 1024.0, real'(kv) / 1024.0, real'(m) / 256.0, 1.0);
      @(negedge clk);
      req_valid = 0;
      n_req++;
      cyc = 0;
      while (!rsp_valid) begin @(negedge clk); cyc++; end
      checks++;
      if (rsp_rgba !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL: L=%0d at=%0d id=%0d u=%0d v=%0d lod=%0d: got %h exp %h",
                                    L, at, id, ku, kv, m, rsp_rgba, exp);
      end
      checks++;
      if (l1_reads - nbefore != nreads) begin
        failures++;
        if (failures < 10) $display("FAIL: %0d L1 reads, expected %0d", l1_reads - nbefore, nreads);
      end
      @(negedge clk);
    end
    checks++;
    if (n_tex != 32'(n_req) || n_biased != 32'(exp_biased)) begin
      failures++;
      $display("FAIL: counters n_tex=%0d (exp %0d) n_biased=%0d (exp %0d)", n_tex, n_req, n_biased, exp_biased);
    end
    $display("texture unit: %0d requests, %0d biased", n_req, exp_biased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
