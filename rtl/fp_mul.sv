// fp_mul: combinational floating-point multiplier with configurable mantissa
// width MW (23: single precision, 7: the truncated 16-bit approximated
// precision format). Same number conventions as fp_add: no denormals,
// truncation, saturation on overflow, flush to zero on underflow.
module fp_mul #(
  parameter int unsigned MW = 23
) (
  input  logic [MW+8:0] a,
  input  logic [MW+8:0] b,
  output logic [MW+8:0] y
);
  logic [2*MW+1:0] p;
  int              e;
  logic [MW-1:0]   m;

  always_comb begin
    p = {1'b1, a[MW-1:0]} * {1'b1, b[MW-1:0]};
    e = int'(a[MW+7:MW]) + int'(b[MW+7:MW]) - 127;
    if (p[2*MW+1]) begin
      m = p[2*MW -: MW];
      e = e + 1;
    end else begin
      m = p[2*MW-1 -: MW];
    end
    if (a[MW+7:MW] == 0 || b[MW+7:MW] == 0 || e <= 0) y = '0;
    else if (e >= 255) y = {a[MW+8] ^ b[MW+8], 8'hFE, {MW{1'b1}}};
    else y = {a[MW+8] ^ b[MW+8], 8'(e), m};
  end
endmodule
