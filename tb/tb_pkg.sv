// tb_pkg: helpers shared by the testbenches: instruction builder for the
// shader ISA of gpu_pkg and conversions between real numbers and the
// IEEE-754 single-precision bit patterns the shader cores use.
package tb_pkg;
  import gpu_pkg::*;

  function automatic instr_t ins(opcode_e op, bit dst_out, int dst, logic [3:0] wmask,
                                 src_sel_e as, int ai, src_sel_e bs, int bi,
                                 logic [7:0] imm = 8'd0,
                                 logic [7:0] aswz = SWZ_XYZW, logic [7:0] bswz = SWZ_XYZW);
    instr_t i;
    i.op = op; i.dst_out = dst_out; i.dst = 4'(dst); i.wmask = wmask;
    i.a.sel = as; i.a.idx = 4'(ai); i.a.swz = aswz;
    i.b.sel = bs; i.b.idx = 4'(bi); i.b.swz = bswz;
    i.imm = imm;
    return i;
  endfunction

  // real -> single precision (mantissa truncated, no denormals)
  function automatic f32_t r2f(real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:0] == 0 || e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFE, 23'h7F_FFFF};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // single precision -> real
  function automatic real f2r(f32_t f);
    if (f[30:23] == 0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic vec4_t v4(real x, real y, real z, real w);
    return {r2f(w), r2f(z), r2f(y), r2f(x)};
  endfunction
endpackage
