// tb_fp_alu_channel: self-checking test of one ALU channel in both widths:
// the full IEEE-754 single-precision channel (MW=23) and the 16-bit
// truncated channel of the approximated precision shader (MW=7, 1 sign,
// 8 exponent, 7 mantissa bits). Random operands of mixed sign and magnitude
// go through every operation; FADD/FSUB/FMUL results are compared with a
// real-number model within the truncation error of the format, FCOMP-based
// operations (MIN, MAX, SLT, SGE), ABS, MOV and the logic operations exactly.
// The channel is combinational: results are checked one time step after the
// operands change (zero-latency path).
module tb_fp_alu_channel;
  import gpu_pkg::*;
  import tb_pkg::*;

  int checks = 0, failures = 0;
  alu_op_e op;
  logic [31:0] a32, b32, y32;
  logic [15:0] a16, b16, y16;

  fp_alu_channel #(.MW(23)) u_full (.op, .a(a32), .b(b32), .y(y32));
  fp_alu_channel #(.MW(7))  u_aps  (.op, .a(a16), .b(b16), .y(y16));

  initial begin
    #(64'd1_000_000);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic real rnd_val();
    real m;
    int  e;
    m = 1.0 + real'($urandom_range(0, 1 << 20)) / real'(1 << 20);
    e = $urandom_range(0, 12) - 6;
    m = m * (2.0 ** e);
    return ($urandom_range(0, 1) == 1) ? -m : m;
  endfunction

  task automatic chk(int mw, alu_op_e o, real ra, real rb, logic [31:0] fa, logic [31:0] fb, logic [31:0] fy);
    real ry, ref_v, tol;
    bit ok;
    ry = f2r(fy);
    tol = 2.0 ** (-(mw - 2));
    ok = 1;
    unique case (o)
      ALU_MOV: ok = fy == fa;
      ALU_ADD: begin ref_v = ra + rb; ok = (ry - ref_v) <= tol * (ra < 0 ? -ra : ra) + tol * (rb < 0 ? -rb : rb) &&
                                            (ref_v - ry) <= tol * (ra < 0 ? -ra : ra) + tol * (rb < 0 ? -rb : rb); end
      ALU_SUB: begin ref_v = ra - rb; ok = (ry - ref_v) <= tol * (ra < 0 ? -ra : ra) + tol * (rb < 0 ? -rb : rb) &&
                                            (ref_v - ry) <= tol * (ra < 0 ? -ra : ra) + tol * (rb < 0 ? -rb : rb); end
      ALU_MUL: begin ref_v = ra * rb; ok = (ry - ref_v) <= tol * (ref_v < 0 ? -ref_v : ref_v) &&
                                            (ref_v - ry) <= tol * (ref_v < 0 ? -ref_v : ref_v); end
      ALU_MIN: ok = fy == ((ra < rb) ? fa : fb);
      ALU_MAX: ok = fy == ((ra < rb) ? fb : fa);
      ALU_ABS: ok = ry == (ra < 0 ? -ra : ra);
      ALU_SLT: ok = ry == ((ra < rb) ? 1.0 : 0.0);
      ALU_SGE: ok = ry == ((ra >= rb) ? 1.0 : 0.0);
      ALU_AND: ok = fy == (fa & fb);
      ALU_OR:  ok = fy == (fa | fb);
      ALU_XOR: ok = fy == (fa ^ fb);
      default: ok = 1;
    endcase
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: MW=%0d %s a=%g b=%g y=%g (%h)", mw, o.name(), ra, rb, ry, fy);
    end
  endtask

  initial begin
    real ra, rb;
    for (int n = 0; n < 4000; n++) begin
      op = alu_op_e'($urandom_range(0, 11));
      ra = rnd_val(); rb = rnd_val();
      if (n % 50 == 0) rb = ra;          // equal operands for the comparisons
      if (n % 77 == 0) rb = -ra;         // cancellation to zero
      a32 = r2f(ra); b32 = r2f(rb);
      a16 = a32[31:16]; b16 = b32[31:16];
      #1;
      chk(23, op, f2r(a32), f2r(b32), a32, b32, y32);
      chk(7, op, f2r({a16, 16'd0}), f2r({b16, 16'd0}), {a16, 16'd0}, {b16, 16'd0}, {y16, 16'd0});
    end
    // the truncated format keeps only 7 mantissa bits
    op = ALU_MUL; a16 = 16'h3FAB; b16 = 16'h3F80; #1;
    checks++; if (y16 != 16'h3FAB) begin failures++; $display("FAIL: APS MUL by one"); end
    op = ALU_ADD; a16 = 16'h3F80; b16 = 16'h3B80; #1;   // 1 + 2^-8 truncates to 1
    checks++; if (y16 != 16'h3F80) begin failures++; $display("FAIL: APS ADD truncation %h", y16); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
