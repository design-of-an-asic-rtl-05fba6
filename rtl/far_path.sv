// far_path: addition, and subtraction with an exponent difference above 1.
// fracB is aligned by a right barrel shift of exp_diff into a 27-bit word:
// 24 significand bits, guard, round, and a sticky bit that ORs in all that
// was shifted out. A 24-bit Kogge-Stone compound adder adds fracA to the
// upper 24 aligned bits (inverted for subtraction), giving sum and sum + 1.
//   Addition: the low 3 bits pass unchanged. Without carry out the result
//   is sum, rounded with the low bits. With carry out it is shifted right by
//   one and sum[0] becomes the guard. Either way rounding up is sum1.
//   Subtraction: a nonzero low part borrows from the upper part, which is
//   then sum (else sum1), and the low part becomes 8 - low. The result is
//   at least 2^22, so it needs at most one left shift. Rounding up uses
//   sum1 again.
// Rounding is to nearest, ties to even. An exponent reaching 255 gives
// infinity. A subtraction with exp_large = 1 that loses its MSB stays
// denormal (exponent field 0).
// The alignment shifter, compound adder and rounding in the adder follow the
// paper. The guard/round/sticky bookkeeping is this design's.
// Inputs: fracA has MSB 1 and fracA*2^exp_large >= fracB*2^(exp_large-exp_diff).
// Purely combinational.
module far_path
  import fp_pkg::*;
(
  input  logic [SIG_W-1:0] fracA,
  input  logic [SIG_W-1:0] fracB,
  input  logic [EXP_W-1:0] exp_large,
  input  logic [4:0]       exp_diff,
  input  logic             sub,
  output logic [SIG_W-1:0] fracs_far,
  output logic [EXP_W-1:0] exps_far
);
  logic [SIG_W+2:0] al;
  logic             lost;
  logic [SIG_W-1:0] bhi, sum, sum1, upper, m;
  logic [2:0]       low, lowd;
  logic             cout, cout1, up;
  logic [EXP_W:0]   e;

  barrel_shifter #(.W(SIG_W+3), .SW(5), .LEFT(1'b0)) u_align (
    .x({fracB, 3'b000}), .amt(exp_diff), .y(al), .lost(lost)
  );

  assign bhi = al[SIG_W+2:3];
  assign low = {al[2:1], al[0] | lost};

  kogge_stone_adder #(.W(SIG_W)) u_add (
    .a(fracA), .b(sub ? ~bhi : bhi), .sum(sum), .sum1(sum1), .cout(cout), .cout1(cout1)
  );

  always_comb begin
    upper = (low != 3'b000) ? sum : sum1;
    lowd  = 3'b000 - low;
    up    = 1'b0;
    m     = sum;
    e     = {1'b0, exp_large};
    if (!sub) begin
      if (!cout) begin
        up = low[2] && (low[1] || low[0] || sum[0]);
        if (up && cout1) begin
          m = {1'b1, {(SIG_W-1){1'b0}}};
          e = {1'b0, exp_large} + 9'd1;
        end else begin
          m = up ? sum1 : sum;
        end
      end else begin
        up = sum[0] && ((low != 3'b000) || sum[1]);
        m  = up ? {cout1, sum1[SIG_W-1:1]} : {1'b1, sum[SIG_W-1:1]};
        e  = {1'b0, exp_large} + 9'd1;
      end
    end else begin
      if (upper[SIG_W-1] || exp_large == 8'd1) begin
        up = lowd[2] && (lowd[1] || lowd[0] || upper[0]);
        m  = up ? sum1 : upper;
        if (!m[SIG_W-1]) e = '0;
      end else begin
        up = lowd[1] && (lowd[0] || lowd[2]);
        e  = {1'b0, exp_large} - 9'd1;
        if (!up)
          m = {upper[SIG_W-2:0], lowd[2]};
        else if (!lowd[2])
          m = {upper[SIG_W-2:0], 1'b1};
        else if (sum1[SIG_W-1]) begin
          m = {1'b1, {(SIG_W-1){1'b0}}};
          e = {1'b0, exp_large};
        end else
          m = {sum1[SIG_W-2:0], 1'b0};
      end
    end
    if (e >= 9'd255) begin
      exps_far  = 8'hFF;
      fracs_far = '0;
    end else begin
      exps_far  = e[EXP_W-1:0];
      fracs_far = m;
    end
  end
endmodule
