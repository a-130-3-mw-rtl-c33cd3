// tb_aps_core: self-checking test of the approximated precision shader core (APS=1) of shader cluster 3: 16-bit truncated ALU channels
// and registers R0..R13, 32-bit R14/R15, results padded with 16 zero bits.
//
// Random constants and inputs are loaded, then a program runs that uses
// every operand source (register file, constant cache, input buffer, output
// buffer), swizzle, write masks, forwarding between back-to-back dependent
// instructions, FADD/FSUB/FMUL/MIN/MAX/ABS/SLT/SGE, the vector summation
// unit (DP3/DP4), the branch handler (a JMP over instructions that would
// corrupt the result) and the texture handler (TEX stalls until a response
// that the testbench delays by a random number of cycles). Results are
// compared with a real-number model within the format's truncation error
// (2^-6 relative). The full 32-bit MOV of the position and the
// 32-bit texture-coordinate register are checked bit-exactly.
// Timing: one instruction per cycle; adding eight independent instructions
// must add exactly eight cycles, a taken JMP exactly two bubble cycles, and
// a TEX exactly the response delay.
module tb_aps_core;
  import gpu_pkg::*;
  import tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic prog_we = 0, const_we = 0, in_we = 0, start = 0, busy, done;
  logic [7:0] prog_addr = 0, start_pc = 0;
  instr_t prog_data = '0;
  logic [3:0] const_addr = 0;
  vec4_t const_data = '0, in_data = '0, out_data;
  logic [2:0] in_addr = 0, out_addr = 0;
  logic tex_req_valid, tex_rsp_valid = 0;
  logic [7:0] tex_req_id;
  vec4_t tex_req_coord;
  logic [31:0] tex_rsp_rgba = 0;
  int tex_delay = 3;

  shader_core #(.APS(1)) dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .const_we, .const_addr, .const_data,
    .in_we, .in_addr, .in_data, .out_addr, .out_data, .start, .start_pc, .busy, .done,
    .tex_req_valid, .tex_req_ready(1'b1), .tex_req_id, .tex_req_coord, .tex_rsp_valid, .tex_rsp_rgba);

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

  // texture responder
  int tex_count = 0;
  vec4_t last_coord;
  logic [7:0] last_id;
  initial begin
    forever begin
      @(posedge clk);
      if (tex_req_valid) begin
        last_coord = tex_req_coord; last_id = tex_req_id; tex_count++;
        repeat (tex_delay - 1) @(posedge clk);
        #1 tex_rsp_valid = 1; tex_rsp_rgba = 32'h4080_2010;
        @(posedge clk); #1 tex_rsp_valid = 0;
      end
    end
  end

  vec4_t ov [8];
  task automatic read_outs();
    for (int i = 0; i < 8; i++) begin out_addr = 3'(i); #1; ov[i] = out_data; end
  endtask

  function automatic real q(real v);   // value as stored in the format under test
    f32_t f = r2f(v);
    if (1) f[15:0] = 16'h0;
    return f2r(f);
  endfunction

  task automatic close(real got, real exp, real scale, string m);
    real tol = (2.0 ** -6) * (scale < 1.0 ? 1.0 : scale);
    chk(got - exp <= tol && exp - got <= tol, $sformatf("%s: got %f expected %f", m, got, exp));
  endtask

  function automatic real rv(real div);
    int r;
    r = $urandom_range(0, 4000);
    return real'(r - 2000) / div;
  endfunction

  task automatic load(int a, instr_t i);
    @(negedge clk); prog_we = 1; prog_addr = 8'(a); prog_data = i;
    @(negedge clk); prog_we = 0;
  endtask

  task automatic run(int pc, output int cycles);
    @(negedge clk); start_pc = 8'(pc); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    real c [4][4], iv [3][4];
    real r0 [4], r1 [4], r2 [4], r3 [4], r4 [4], dp3, dp4, dsc;
    int cyc0, cyc1, cyc2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      for (int k = 0; k < 4; k++) for (int l = 0; l < 4; l++) c[k][l] = q(rv(512.0));
      for (int k = 0; k < 3; k++) for (int l = 0; l < 4; l++) iv[k][l] = rv(256.0);
      for (int k = 0; k < 4; k++) begin
        @(negedge clk); const_we = 1; const_addr = 4'(k); const_data = v4(c[k][0], c[k][1], c[k][2], c[k][3]);
      end
      @(negedge clk); const_we = 0;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); in_we = 1; in_addr = 3'(k); in_data = v4(iv[k][0], iv[k][1], iv[k][2], iv[k][3]);
      end
      @(negedge clk); in_we = 0;
      if (rep == 0) begin
        // main program at 0
        load(0,  ins(OP_ADD, 0, 0, 4'hF, SRC_IN, 0, SRC_CONST, 0));            // r0 = i0 + c0
        load(1,  ins(OP_MUL, 0, 1, 4'hF, SRC_REG, 0, SRC_IN, 1));              // r1 = r0 * i1 (forwarded)
        load(2,  ins(OP_SUB, 0, 2, 4'hF, SRC_REG, 1, SRC_CONST, 1));           // r2 = r1 - c1
        load(3,  ins(OP_MIN, 0, 3, 4'hF, SRC_REG, 2, SRC_CONST, 2));           // r3 = min(r2, c2)
        load(4,  ins(OP_MAX, 0, 4, 4'hF, SRC_REG, 3, SRC_IN, 0, 8'd0, SWZ_XYZW, 8'b00_01_10_11)); // r4 = max(r3, i0.wzyx)
        load(5,  ins(OP_ABS, 1, 0, 4'hF, SRC_REG, 4, SRC_REG, 0));             // o0 = |r4|
        load(6,  ins(OP_SLT, 1, 1, 4'hF, SRC_IN, 0, SRC_IN, 1));               // o1 = i0 < i1
        load(7,  ins(OP_SGE, 1, 2, 4'hF, SRC_IN, 0, SRC_IN, 1));               // o2 = i0 >= i1
        load(8,  ins(OP_JMP, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0, 8'd11));
        load(9,  ins(OP_MOV, 1, 0, 4'hF, SRC_CONST, 3, SRC_REG, 0));           // skipped
        load(10, ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0));             // skipped
        load(11, ins(OP_DP3, 1, 3, 4'h1, SRC_IN, 0, SRC_IN, 1));               // o3.x = dot3
        load(12, ins(OP_DP4, 1, 4, 4'hF, SRC_IN, 0, SRC_IN, 1));               // o4 = dot4
        load(13, ins(OP_MOV, 0, 14, 4'hF, SRC_IN, 2, SRC_REG, 0));             // r14 = i2 (32-bit)
        load(14, ins(OP_TEX, 1, 5, 4'hF, SRC_REG, 14, SRC_REG, 0, 8'd3));      // o5 = tex(r14)
        load(15, ins(OP_MOV, 1, 6, 4'h5, SRC_REG, 1, SRC_REG, 0));             // o6.xz = r1.xz
        load(16, ins(OP_ADD, 1, 6, 4'hA, SRC_OUT, 0, SRC_OUT, 6));             // o6.yw = o0 + o6 (output buffer source)
        load(17, ins(OP_MOV, 1, 7, 4'hF, SRC_IN, 0, SRC_REG, 0));              // o7 = i0 (full precision)
        load(18, ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0));
        // timing programs: 4 instructions / 12 instructions / JMP
        load(32, ins(OP_ADD, 0, 5, 4'hF, SRC_IN, 0, SRC_IN, 1));
        load(33, ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0));
        for (int k = 0; k < 8; k++) load(40 + k, ins(OP_ADD, 0, 5 + (k % 4), 4'hF, SRC_IN, 0, SRC_IN, 1));
        load(48, ins(OP_ADD, 0, 5, 4'hF, SRC_IN, 0, SRC_IN, 1));
        load(49, ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0));
        load(56, ins(OP_JMP, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0, 8'd57));
        load(57, ins(OP_ADD, 0, 5, 4'hF, SRC_IN, 0, SRC_IN, 1));
        load(58, ins(OP_END, 0, 0, 4'h0, SRC_REG, 0, SRC_REG, 0));
      end
      tex_delay = $urandom_range(1, 6);
      run(0, cyc0);
      chk(!busy, "core idle after done");
      read_outs();
      // model
      for (int l = 0; l < 4; l++) begin
        r0[l] = q(iv[0][l] + c[0][l]);
        r1[l] = q(r0[l] * iv[1][l]);
        r2[l] = q(r1[l] - c[1][l]);
        r3[l] = r2[l] < c[2][l] ? r2[l] : c[2][l];
        r4[l] = r3[l] > iv[0][3-l] ? r3[l] : iv[0][3-l];
      end
      dp3 = iv[0][0]*iv[1][0] + iv[0][1]*iv[1][1] + iv[0][2]*iv[1][2];
      dp4 = dp3 + iv[0][3]*iv[1][3];
      dsc = 0.0;
      for (int l = 0; l < 4; l++) dsc += 2.0 * ((iv[0][l]*iv[1][l] < 0) ? -iv[0][l]*iv[1][l] : iv[0][l]*iv[1][l]);
      for (int l = 0; l < 4; l++) begin
        automatic real sc = 1.0 + (r0[l] < 0 ? -r0[l] : r0[l]) * (iv[1][l] < 0 ? -iv[1][l] : iv[1][l]) + (c[1][l] < 0 ? -c[1][l] : c[1][l]);
        close(f2r(ov[0][l]), r4[l] < 0 ? -r4[l] : r4[l], sc, $sformatf("ABS/MAX/MIN/SUB/MUL/ADD chain lane %0d", l));
        chk(f2r(ov[1][l]) == (iv[0][l] < iv[1][l] ? 1.0 : 0.0) || q(iv[0][l]) == q(iv[1][l]), "SLT");
        chk(f2r(ov[2][l]) == (iv[0][l] >= iv[1][l] ? 1.0 : 0.0) || q(iv[0][l]) == q(iv[1][l]), "SGE");
        close(f2r(ov[4][l]), dp4, dsc, "DP4");
        chk(ov[7][l] == r2f(iv[0][l]), "full-precision MOV of the position");
      end
      close(f2r(ov[3][0]), dp3, dsc, "DP3");
      chk(ov[5][0] == u8_to_f32(8'h10) && ov[5][1] == u8_to_f32(8'h20) &&
          ov[5][2] == u8_to_f32(8'h80) && ov[5][3] == u8_to_f32(8'h40), "TEX result");
      chk(last_id == 8'd3, "texture ID");
      chk(last_coord[0] == r2f(iv[2][0]) && last_coord[1] == r2f(iv[2][1]) && last_coord[2] == r2f(iv[2][2]),
          "texture coordinate register keeps 32 bits");
      close(f2r(ov[6][0]), r1[0], 1.0 + (r1[0] < 0 ? -r1[0] : r1[0]), "masked MOV lane x");
      close(f2r(ov[6][2]), r1[2], 1.0 + (r1[2] < 0 ? -r1[2] : r1[2]), "masked MOV lane z");
      // APS: ALU results carry 16 zero LSBs; MOV keeps all 32 bits; R14 is 32-bit
      for (int l = 0; l < 4; l++) begin
        chk(ov[0][l][15:0] == 16'h0, "APS ALU result padded with zeros");
        chk(ov[6][l][15:0] == 16'h0, "APS register R1 holds 16 bits");
      end
      // timing
      run(32, cyc1);
      run(40, cyc2);
      chk(cyc2 - cyc1 == 8, $sformatf("8 extra instructions cost %0d cycles", cyc2 - cyc1));
      run(56, cyc2);
      chk(cyc2 - cyc1 == 3, $sformatf("JMP costs %0d cycles (1 + 2 bubbles expected)", cyc2 - cyc1));
      chk(cyc0 == 19 - 2 + 2 + (tex_delay - 1) + 3 + 1 + 1 - 1, $sformatf("main program took %0d cycles (tex delay %0d)", cyc0, tex_delay));
    end
    chk(tex_count == 20, "one texture request per TEX");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
