// shader_core: four-channel SIMD unified shader processor.
//
// Runs one vertex or pixel thread at a time through four pipeline stages,
// as the source describes: Fetch (program counter into the instruction
// cache, redirected by the jump PC of the branch handler), Decode, Execute
// (operands from the register file, constant cache, input buffer or output
// buffer; swizzle; four ALU channels gated by the write mask, i.e. the
// vec2/vec3/vec4 type; vector summation for dot products; branch handler;
// texture handler) and Write Back (to the register file or the output buffer).
//
// APS = 1 builds the Approximated Precision Shader core of shader cluster 3:
// the ALU channels and the general registers R0..R13 use the truncated 16-bit
// float (1 sign, 8 exponent, 7 mantissa bits: the 16 least significant
// mantissa bits dropped), while R14 and R15 stay 32-bit for the pixel position
// and the texture coordinate. MOV is not an arithmetic operation and moves all
// 32 bits, so a pixel program can copy the full-precision position from the
// input buffer to the output buffer. ALU results are padded with 16 zero bits
// to 32 bits. Input buffer, constant cache and output buffer are 32-bit.
//
// Interface:
//  * prog_*/const_*: load the instruction cache and constant cache (the
//    source calls them caches; here they are program-loaded memories).
//  * in_*: write the thread's input buffer (vertex attributes or pixel
//    varyings) before start; out_addr/out_data: read the output buffer.
//  * start/start_pc: begin a thread when busy is low; done pulses one cycle
//    when the END instruction retires; all earlier writes have landed then.
//  * tex_req_*/tex_rsp_*: the texture handler. A TEX instruction sends
//    texture ID imm and coordinate (u, v, LOD) = operand A lanes x, y, z and
//    stalls Fetch..Execute until the filtered RGBA8 texel returns; channel c
//    is written as the float c/256.
// Timing: one instruction per cycle; a taken JMP (resolved in Execute)
// costs two bubbles; results are forwarded from Write Back to Execute so
// back-to-back dependent instructions do not stall. The instruction
// encoding (gpu_pkg::instr_t), the forwarding and the texel format are this
// design's choices.
module shader_core
  import gpu_pkg::*;
#(
  parameter bit          APS        = 1'b0,
  parameter int unsigned NREG       = 16,
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned CMEM_DEPTH = 16,
  parameter int unsigned NIN        = 8,
  parameter int unsigned NOUT       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // program / constant load
  input  logic        prog_we,
  input  logic [7:0]  prog_addr,
  input  instr_t      prog_data,
  input  logic        const_we,
  input  logic [3:0]  const_addr,
  input  vec4_t       const_data,
  // input / output buffers
  input  logic        in_we,
  input  logic [2:0]  in_addr,
  input  vec4_t       in_data,
  input  logic [2:0]  out_addr,
  output vec4_t       out_data,
  // thread control
  input  logic        start,
  input  logic [7:0]  start_pc,
  output logic        busy,
  output logic        done,
  // texture handler
  output logic        tex_req_valid,
  input  logic        tex_req_ready,
  output logic [7:0]  tex_req_id,
  output vec4_t       tex_req_coord,
  input  logic        tex_rsp_valid,
  input  logic [31:0] tex_rsp_rgba
);
  localparam int unsigned MW   = APS ? 7 : 23;   // ALU mantissa width
  localparam int unsigned AW   = MW + 9;         // ALU word width
  localparam int unsigned NLO  = APS ? 2 : NREG; // registers holding the low 16 bits
  localparam int unsigned LO0  = APS ? NREG - 2 : 0;

  // ---------------- storage ----------------
  instr_t            imem [IMEM_DEPTH];
  vec4_t             cmem [CMEM_DEPTH];
  vec4_t             ibuf [NIN];
  vec4_t             obuf [NOUT];
  logic [3:0][15:0]  rf_hi [NREG];
  logic [3:0][15:0]  rf_lo [NLO];

  always_ff @(posedge clk) begin
    if (prog_we)  imem[prog_addr[$clog2(IMEM_DEPTH)-1:0]] <= prog_data;
    if (const_we) cmem[const_addr[$clog2(CMEM_DEPTH)-1:0]] <= const_data;
    if (in_we)    ibuf[in_addr[$clog2(NIN)-1:0]] <= in_data;
  end

  assign out_data = obuf[out_addr[$clog2(NOUT)-1:0]];

  function automatic bit has_lo(input logic [3:0] r);
    return !APS || (int'(r) >= int'(LO0));
  endfunction

  function automatic int lo_idx(input logic [3:0] r);
    return APS ? int'(r) - int'(LO0) : int'(r);
  endfunction

  function automatic vec4_t rf_read(input logic [3:0] r);
    vec4_t v;
    for (int l = 0; l < 4; l++)
      v[l] = {rf_hi[r][l], has_lo(r) ? rf_lo[lo_idx(r)][l] : 16'h0000};
    return v;
  endfunction

  // ---------------- pipeline registers ----------------
  logic        running;
  logic [7:0]  pc;
  logic        fd_valid, de_valid, ew_valid;
  instr_t      fd_ins, de_ins;
  logic        ew_dst_out;
  logic [3:0]  ew_dst, ew_wmask;
  vec4_t       ew_data;
  logic        tex_sent;

  // ---------------- execute ----------------
  logic        stall, redirect, finish;
  vec4_t       opa, opb, raw_a, raw_b, alu_y, ex_res;
  logic [AW-1:0] alu_a [4], alu_b [4], alu_o [4];
  logic [AW-1:0] s01, s23, s012, s0123;
  alu_op_e     aop;

  // value a register will hold after the write in Write Back (storage width)
  function automatic vec4_t stored(input logic [3:0] r, input vec4_t v);
    vec4_t s;
    for (int l = 0; l < 4; l++) s[l] = has_lo(r) ? v[l] : {v[l][31:16], 16'h0000};
    return s;
  endfunction

  function automatic vec4_t read_src(input src_t s);
    vec4_t v;
    unique case (s.sel)
      SRC_REG:   v = rf_read(s.idx);
      SRC_CONST: v = cmem[s.idx[$clog2(CMEM_DEPTH)-1:0]];
      SRC_IN:    v = ibuf[s.idx[$clog2(NIN)-1:0]];
      default:   v = obuf[s.idx[$clog2(NOUT)-1:0]];
    endcase
    // forwarding from Write Back
    if (ew_valid && s.idx == ew_dst &&
        ((s.sel == SRC_REG && !ew_dst_out) || (s.sel == SRC_OUT && ew_dst_out))) begin
      vec4_t f;
      f = ew_dst_out ? ew_data : stored(ew_dst, ew_data);
      for (int l = 0; l < 4; l++) if (ew_wmask[l]) v[l] = f[l];
    end
    return v;
  endfunction

  function automatic vec4_t swizzle(input vec4_t v, input logic [7:0] swz);
    vec4_t o;
    for (int l = 0; l < 4; l++) o[l] = v[swz[2*l +: 2]];
    return o;
  endfunction

  always_comb begin
    raw_a = read_src(de_ins.a);
    raw_b = read_src(de_ins.b);
    opa   = swizzle(raw_a, de_ins.a.swz);
    opb   = swizzle(raw_b, de_ins.b.swz);
    unique case (de_ins.op)
      OP_ADD: aop = ALU_ADD;
      OP_SUB: aop = ALU_SUB;
      OP_MUL, OP_DP3, OP_DP4: aop = ALU_MUL;
      OP_MIN: aop = ALU_MIN;
      OP_MAX: aop = ALU_MAX;
      OP_ABS: aop = ALU_ABS;
      OP_SLT: aop = ALU_SLT;
      OP_SGE: aop = ALU_SGE;
      OP_AND: aop = ALU_AND;
      OP_OR:  aop = ALU_OR;
      OP_XOR: aop = ALU_XOR;
      default: aop = ALU_MOV;
    endcase
  end

  for (genvar l = 0; l < 4; l++) begin : g_ch
    // lanes outside the vector type are held at zero operands (no switching)
    assign alu_a[l] = de_ins.wmask[l] || de_ins.op == OP_DP3 || de_ins.op == OP_DP4
                      ? opa[l][31 -: AW] : '0;
    assign alu_b[l] = de_ins.wmask[l] || de_ins.op == OP_DP3 || de_ins.op == OP_DP4
                      ? opb[l][31 -: AW] : '0;
    fp_alu_channel #(.MW(MW)) u_ch (.op(aop), .a(alu_a[l]), .b(alu_b[l]), .y(alu_o[l]));
    if (AW < 32) begin : g_pad
      assign alu_y[l] = {alu_o[l], {(32 - AW){1'b0}}};
    end else begin : g_full
      assign alu_y[l] = alu_o[l];
    end
  end

  // vector summation unit (dot products)
  fp_add #(.MW(MW)) u_s01  (.a(alu_o[0]), .b(alu_o[1]), .sub(1'b0), .y(s01));
  fp_add #(.MW(MW)) u_s23  (.a(alu_o[2]), .b(alu_o[3]), .sub(1'b0), .y(s23));
  fp_add #(.MW(MW)) u_s012 (.a(s01),      .b(alu_o[2]), .sub(1'b0), .y(s012));
  fp_add #(.MW(MW)) u_s4   (.a(s01),      .b(s23),      .sub(1'b0), .y(s0123));

  always_comb begin
    logic [31:0] dsum;
    dsum = 32'(de_ins.op == OP_DP3 ? s012 : s0123) << (32 - AW);
    unique case (de_ins.op)
      OP_MOV:          ex_res = opa;
      OP_DP3, OP_DP4:  ex_res = {dsum, dsum, dsum, dsum};
      OP_TEX:          ex_res = {u8_to_f32(tex_rsp_rgba[31:24]), u8_to_f32(tex_rsp_rgba[23:16]),
                                 u8_to_f32(tex_rsp_rgba[15:8]),  u8_to_f32(tex_rsp_rgba[7:0])};
      default:         ex_res = alu_y;
    endcase
  end

  assign tex_req_valid = running && de_valid && de_ins.op == OP_TEX && !tex_sent;
  assign tex_req_id    = de_ins.imm;
  assign tex_req_coord = opa;

  assign stall    = running && de_valid && de_ins.op == OP_TEX && !tex_rsp_valid;
  assign redirect = running && de_valid && de_ins.op == OP_JMP;
  assign finish   = running && de_valid && de_ins.op == OP_END;
  assign busy     = running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      pc       <= '0;
      fd_valid <= 1'b0;
      de_valid <= 1'b0;
      ew_valid <= 1'b0;
      tex_sent <= 1'b0;
      done     <= 1'b0;
      fd_ins   <= '0;
      de_ins   <= '0;
      ew_dst_out <= 1'b0;
      ew_dst   <= '0;
      ew_wmask <= '0;
      ew_data  <= '0;
    end else begin
      done <= 1'b0;
      if (tex_req_valid && tex_req_ready) tex_sent <= 1'b1;
      if (tex_rsp_valid) tex_sent <= 1'b0;
      // Write Back stage register
      ew_valid   <= running && de_valid && !stall && !redirect && !finish &&
                    de_ins.op != OP_NOP;
      ew_dst_out <= de_ins.dst_out;
      ew_dst     <= de_ins.dst;
      ew_wmask   <= de_ins.wmask;
      ew_data    <= ex_res;
      if (!running) begin
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
        if (start) begin
          running <= 1'b1;
          pc      <= start_pc;
        end
      end else if (finish) begin
        running  <= 1'b0;
        done     <= 1'b1;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
      end else if (redirect) begin
        pc       <= de_ins.imm;
        fd_valid <= 1'b0;
        de_valid <= 1'b0;
      end else if (!stall) begin
        fd_ins   <= imem[pc[$clog2(IMEM_DEPTH)-1:0]];
        fd_valid <= 1'b1;
        pc       <= pc + 8'd1;
        de_ins   <= fd_ins;
        de_valid <= fd_valid;
      end
    end
  end

  // Write Back
  always_ff @(posedge clk) begin
    if (ew_valid) begin
      for (int l = 0; l < 4; l++) begin
        if (ew_wmask[l]) begin
          if (ew_dst_out) obuf[ew_dst[$clog2(NOUT)-1:0]][l] <= ew_data[l];
          else begin
            rf_hi[ew_dst][l] <= ew_data[l][31:16];
            if (has_lo(ew_dst)) rf_lo[lo_idx(ew_dst)][l] <= ew_data[l][15:0];
          end
        end
      end
    end
  end

  // a texture response only arrives for an outstanding request
  a_tex_rsp: assert property (@(posedge clk) disable iff (!rst_n) tex_rsp_valid |-> tex_sent);
endmodule
