// close_path: effective subtraction with an exponent difference of 0 or 1.
// With d the difference, the exact result D = {fracA,0} - ({fracB,0} >> d)
// has 25 bits. A 24-bit Kogge-Stone compound adder adds fracA to the
// inverted upper 24 bits of the shifted fracB, giving sum = A - B' - 1 and
// sum1 = A - B'. If a 1 falls into the guard bit (d = 1 and fracB odd), the
// upper part is sum and the guard is 1; otherwise it is sum1.
// In parallel, a leading one predictor works on the operands. D is shifted
// left by the prediction with a barrel shifter, then by one more bit if its
// MSB is still 0. When no shift is needed the guard bit is rounded to
// nearest even, and the round-up value sum + 1 is sum1, so rounding comes
// out of the compound adder at no extra cost. The shift never takes the
// exponent below 1: at that limit the result stays denormal (exponent
// field 0). A zero result raises zero_close.
// The compound adder, LOP, barrel shifter and rounding in the adder follow
// the paper; the guard-bit scheme and the denormal limit are this
// design's. Inputs: fracA >= fracB >> d, both with MSB 1, and exp_large >= 1.
// Purely combinational.
module close_path
  import fp_pkg::*;
(
  input  logic [SIG_W-1:0] fracA,
  input  logic [SIG_W-1:0] fracB,
  input  logic [EXP_W-1:0] exp_large,
  input  logic             one_d,
  output logic [SIG_W-1:0] fracs_close,
  output logic [EXP_W-1:0] exps_close,
  output logic             zero_close
);
  logic [SIG_W-1:0] bsh, sum, sum1, upper;
  logic             guard, cout, cout1;
  logic [SIG_W:0]   d, d1, d2;
  logic [4:0]       lzp, sh_a, sh;
  logic [EXP_W-1:0] emax;
  logic             corr, unused_lost, unused_c;

  assign bsh   = one_d ? {1'b0, fracB[SIG_W-1:1]} : fracB;
  assign guard = one_d & fracB[0];

  kogge_stone_adder #(.W(SIG_W)) u_add (
    .a(fracA), .b(~bsh), .sum(sum), .sum1(sum1), .cout(cout), .cout1(cout1)
  );
  assign unused_c = cout ^ cout1 ^ d2[0];

  assign upper = guard ? sum : sum1;
  assign d     = {upper, guard};

  lop #(.W(SIG_W+1)) u_lop (
    .a({fracA, 1'b0}),
    .b(one_d ? {1'b0, fracB} : {fracB, 1'b0}),
    .lz(lzp)
  );

  assign emax = exp_large - 8'd1;
  assign sh_a = ({3'b000, lzp} > emax) ? emax[4:0] : lzp;

  barrel_shifter #(.W(SIG_W+1), .SW(5), .LEFT(1'b1)) u_norm (
    .x(d), .amt(sh_a), .y(d1), .lost(unused_lost)
  );

  assign corr = !d1[SIG_W] && ({3'b000, lzp} < emax);
  assign d2   = corr ? {d1[SIG_W-1:0], 1'b0} : d1;
  assign sh   = sh_a + {4'b0, corr};

  always_comb begin
    if (sh == '0)
      fracs_close = (guard && sum[0]) ? sum1 : upper;
    else
      fracs_close = d2[SIG_W:1];
    exps_close = fracs_close[SIG_W-1] ? exp_large - {3'b000, sh} : '0;
    zero_close = (d == '0);
  end
endmodule
