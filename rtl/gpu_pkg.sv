// gpu_pkg: types, constants and conversion functions shared by the GPU.
//
// Holds the shader instruction format (an encoding of this design's own: the
// source describes fetch/decode/execute/write-back, operand sources, swizzle,
// vector sum, jump and texture instructions but no bit layout), the 8x4 screen
// tile geometry of the raster, the SSAL pattern codes and the number format
// conversions between IEEE-754 single precision, the signed Q16.16 fixed point
// used inside the raster, and 8-bit colour channels.
package gpu_pkg;

  // ---------------- screen tiles ----------------
  localparam int unsigned TILE_W   = 8;   // "8x4 Tile" (Fig. 6), 32-bit valid map
  localparam int unsigned TILE_H   = 4;
  localparam int unsigned TILE_PIX = TILE_W * TILE_H;

  // ---------------- floating point ----------------
  typedef logic [31:0] f32_t;
  typedef f32_t [3:0]  vec4_t;             // [0]=x .. [3]=w
  localparam f32_t F32_ONE  = 32'h3F80_0000;
  localparam f32_t F32_ZERO = 32'h0000_0000;

  // ---------------- shader instruction set ----------------
  typedef enum logic [4:0] {
    OP_NOP = 5'd0,  OP_MOV = 5'd1,  OP_ADD = 5'd2,  OP_SUB = 5'd3,
    OP_MUL = 5'd4,  OP_MIN = 5'd5,  OP_MAX = 5'd6,  OP_ABS = 5'd7,
    OP_SLT = 5'd8,  OP_SGE = 5'd9,  OP_AND = 5'd10, OP_OR  = 5'd11,
    OP_XOR = 5'd12, OP_DP3 = 5'd13, OP_DP4 = 5'd14, OP_TEX = 5'd15,
    OP_JMP = 5'd16, OP_END = 5'd17
  } opcode_e;

  // ALU-channel operations (Fig. 4)
  typedef enum logic [3:0] {
    ALU_MOV, ALU_ADD, ALU_SUB, ALU_MUL, ALU_MIN, ALU_MAX, ALU_ABS,
    ALU_SLT, ALU_SGE, ALU_AND, ALU_OR, ALU_XOR
  } alu_op_e;

  // Operand sources (Sec. II: register file, constant cache, input buffer, output buffer)
  typedef enum logic [1:0] { SRC_REG = 2'd0, SRC_CONST = 2'd1, SRC_IN = 2'd2, SRC_OUT = 2'd3 } src_sel_e;

  typedef struct packed {
    src_sel_e   sel;
    logic [3:0] idx;
    logic [7:0] swz;   // 2 bits per destination lane: lane i takes component swz[2i+1:2i]
  } src_t;

  typedef struct packed {
    opcode_e    op;
    logic       dst_out;  // 1: write the output buffer, 0: the register file
    logic [3:0] dst;
    logic [3:0] wmask;    // vec2/vec3/vec4 lanes enabled
    src_t       a;
    src_t       b;
    logic [7:0] imm;      // jump target or texture ID
  } instr_t;              // 50 bits

  localparam logic [7:0] SWZ_XYZW = 8'b11_10_01_00;

  typedef enum logic { THREAD_VERTEX = 1'b0, THREAD_PIXEL = 1'b1 } thread_e;

  // ---------------- SSAL pixel roles ----------------
  typedef enum logic [2:0] {
    PR_NONE    = 3'd0,  // not covered
    PR_SHADE   = 3'd1,  // sampled: a pixel thread is run
    PR_PLANE   = 3'd2,  // 4x4 plane fitting from the four sub-tile corners
    PR_AVG2    = 3'd3,  // (partial) 2x2 interpolation: average of the two samples
    PR_SPLAT   = 3'd4   // one-point splat from the one sample of its 1x2/2x1 pair
  } pix_role_e;

  // ---------------- conversions ----------------
  // float -> signed Q16.16, truncating toward zero, saturating.
  function automatic logic signed [31:0] f32_to_fix(input f32_t f);
    logic [7:0]  e;
    logic [47:0] m;
    int          sh;
    logic [47:0] v;
    e = f[30:23];
    if (e == 8'd0) return 32'sd0;
    m = {24'd0, 1'b1, f[22:0]};        // value = m * 2^(e-150); Q16.16 wants m*2^(e-134)
    sh = int'(e) - 134;
    if (sh >= 15) v = 48'h0000_7FFF_FFFF;
    else if (sh >= 0) v = m << sh;
    else if (sh > -48) v = m >> (-sh);
    else v = '0;
    if (v > 48'h0000_7FFF_FFFF) v = 48'h0000_7FFF_FFFF;
    return f[31] ? -$signed(v[31:0]) : $signed(v[31:0]);
  endfunction

  // signed Q16.16 -> float, truncating.
  function automatic f32_t fix_to_f32(input logic signed [31:0] q);
    logic [31:0] mag;
    logic [4:0]  lz;
    logic [31:0] n;
    if (q == 0) return F32_ZERO;
    mag = q[31] ? 32'(-q) : 32'(q);
    lz = 5'd0;
    for (int i = 0; i < 32; i++) if (mag[i]) lz = 5'(31 - i);
    n = mag << lz;                     // leading one at bit 31
    // value = mag * 2^-16 ; leading bit position p = 31-lz -> exponent p-16
    return {q[31], 8'(142 - int'(lz)), n[30:8]};
  endfunction

  // 8-bit channel c -> float c/256
  function automatic f32_t u8_to_f32(input logic [7:0] c);
    return fix_to_f32({16'd0, c, 8'd0});
  endfunction

  // float in [0,1] -> 8-bit channel floor(f*256), clamped to 0..255
  function automatic logic [7:0] f32_to_u8(input f32_t f);
    logic signed [31:0] q;
    q = f32_to_fix(f);
    if (q < 0) return 8'd0;
    if (q >= 32'sh0001_0000) return 8'd255;
    return q[15:8];
  endfunction

endpackage
