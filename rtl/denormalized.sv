// denormalized: sum of two denormal operands.
// Both exponents are zero, so the significands line up without shifting.
// Each 24-bit adder input is the exponent LSB (0) followed by the 23-bit
// fraction; a carry into the top bit therefore lands in the exponent LSB,
// turning the result into the smallest normal exponent when it overflows.
// One 24-bit Kogge-Stone compound adder does the work: for like signs
// s = a + b; for unlike signs it adds a to ~b, and a + ~b + 1 = a - b when
// that carries out (a >= b), else ~(a + ~b) = b - a with b's sign. The
// result is always exact. The adder, its width and the exponent-LSB trick
// follow the paper; the subtraction scheme and +0 for an exact zero are
// this design's. Valid only when both operands are denormal.
// Purely combinational.
module denormalized
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);
  fp32_t            fa, fb;
  logic             sub;
  logic [SIG_W-1:0] ma, mb, sum, sum1, mag;
  logic             cout, cout1, sgn, unused_c;

  assign unused_c = cout;

  assign fa  = a;
  assign fb  = b;
  assign sub = fa.sign ^ fb.sign;
  assign ma  = {fa.exp[0], fa.frac};
  assign mb  = {fb.exp[0], fb.frac};

  kogge_stone_adder #(.W(SIG_W)) u_add (
    .a(ma), .b(sub ? ~mb : mb),
    .sum(sum), .sum1(sum1), .cout(cout), .cout1(cout1)
  );

  always_comb begin
    if (!sub) begin
      mag = sum;
      sgn = fa.sign;
    end else if (cout1) begin
      mag = sum1;
      sgn = fa.sign;
    end else begin
      mag = ~sum;
      sgn = fb.sign;
    end
    if (mag == '0) sgn = 1'b0;
    s = {sgn, 7'b0, mag};
  end
endmodule
