// fp_add: combinational floating-point adder/subtractor with a configurable
// mantissa width MW (23 for IEEE-754 single precision, 7 for the truncated
// 16-bit format of the approximated precision shader). Operands are
// {sign, 8-bit exponent, MW-bit mantissa}. Zero exponent is treated as zero
// (no denormals), results are truncated (round toward zero), overflow
// saturates to the largest finite value, underflow flushes to zero. NaN and
// infinity handling is not provided. These simplifications are this design's
// choice; the source only names the adder as part of each ALU channel.
module fp_add #(
  parameter int unsigned MW = 23
) (
  input  logic [MW+8:0] a,
  input  logic [MW+8:0] b,
  input  logic          sub,
  output logic [MW+8:0] y
);
  localparam int unsigned SW = MW + 4;   // hidden bit + MW + guard bits + carry

  logic          sa, sb, sl, ss;
  logic [7:0]    ea, eb, el, es;
  logic [SW-1:0] ml, ms, msh, sum;
  logic [7:0]    d;
  logic [5:0]    lz;
  logic [SW-1:0] norm;
  int            e_res;

  always_comb begin
    sa = a[MW+8];
    sb = b[MW+8] ^ sub;
    ea = a[MW+7:MW];
    eb = b[MW+7:MW];
    // larger magnitude first
    if ({ea, a[MW-1:0]} >= {eb, b[MW-1:0]}) begin
      sl = sa; el = ea; ml = {1'b0, (ea != 0), a[MW-1:0], 2'b00};
      ss = sb; es = eb; ms = {1'b0, (eb != 0), b[MW-1:0], 2'b00};
    end else begin
      sl = sb; el = eb; ml = {1'b0, (eb != 0), b[MW-1:0], 2'b00};
      ss = sa; es = ea; ms = {1'b0, (ea != 0), a[MW-1:0], 2'b00};
    end
    d   = el - es;
    msh = (d >= 8'(SW)) ? '0 : (ms >> d);
    sum = (sl == ss) ? (ml + msh) : (ml - msh);
    // leading-zero count as a priority encoder (the highest set bit wins)
    lz = 6'(SW);
    for (int i = 0; i < SW; i++) if (sum[i]) lz = 6'(SW - 1 - i);
    // sum has hidden bit at SW-2; lz==1 means already normalised
    norm  = sum << lz;
    e_res = int'(el) + 1 - int'(lz);
    if (el == 0 || sum == '0 || e_res <= 0) y = '0;
    else if (e_res >= 255) y = {sl, 8'hFE, {MW{1'b1}}};
    else y = {sl, 8'(e_res), norm[SW-2 -: MW]};
  end
endmodule
