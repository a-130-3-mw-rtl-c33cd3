// fp_alu_channel: one of the four ALU channels of the SIMD shader core.
//
// Following the channel diagram of the source, a channel holds a floating
// point multiplier, an adder, comparators (min/max/set-less-than/
// set-greater-equal, results 1.0 or 0.0), absolute value and bitwise logic
// operations, selected by an operation code. It is purely combinational; the
// shader core registers its result in the Execute/Write-Back pipeline register.
// MW sets the mantissa width: 23 gives IEEE-754 single precision, 7 gives the
// 16-bit truncated format (1 sign, 8 exponent, 7 mantissa bits) of the
// approximated precision shader cluster. The operation encoding and the
// rounding behaviour (truncation, see fp_add) are this design's choices.
module fp_alu_channel
  import gpu_pkg::*;
#(
  parameter int unsigned MW = 23
) (
  input  alu_op_e        op,
  input  logic [MW+8:0]  a,
  input  logic [MW+8:0]  b,
  output logic [MW+8:0]  y
);
  localparam logic [MW+8:0] ONE = {1'b0, 8'd127, {MW{1'b0}}};

  logic [MW+8:0] sum, prod;
  logic          a_lt_b;

  fp_add #(.MW(MW)) u_add (.a(a), .b(b), .sub(op == ALU_SUB), .y(sum));
  fp_mul #(.MW(MW)) u_mul (.a(a), .b(b), .y(prod));

  // sign-magnitude comparison; +0 and -0 compare equal
  always_comb begin
    logic [MW+7:0] ma, mb;
    ma = (a[MW+7:MW] == 0) ? '0 : a[MW+7:0];
    mb = (b[MW+7:MW] == 0) ? '0 : b[MW+7:0];
    unique case ({a[MW+8] && ma != 0, b[MW+8] && mb != 0})
      2'b00: a_lt_b = ma < mb;
      2'b11: a_lt_b = ma > mb;
      2'b10: a_lt_b = 1'b1;
      default: a_lt_b = 1'b0;
    endcase
  end

  always_comb begin
    unique case (op)
      ALU_MOV: y = a;
      ALU_ADD, ALU_SUB: y = sum;
      ALU_MUL: y = prod;
      ALU_MIN: y = a_lt_b ? a : b;
      ALU_MAX: y = a_lt_b ? b : a;
      ALU_ABS: y = {1'b0, a[MW+7:0]};
      ALU_SLT: y = a_lt_b ? ONE : '0;
      ALU_SGE: y = a_lt_b ? '0 : ONE;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      default: y = a;
    endcase
  end
endmodule
