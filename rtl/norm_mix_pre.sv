// norm_mix_pre: final preparation of the normal/mixed operands.
// It finds the effective operation (sub = signs differ), orders the
// operands so that A is the one of larger magnitude (its sign is the sign
// of the result), and forms the larger exponent and the exponent
// difference. In the mixed case A is always the normal operand and B's
// exponent field is a shift count c meaning the true exponent 1 - c, so the
// difference is expA - 1 + c. The difference saturates at 31: from 27 on
// the smaller operand only sets the sticky bit. path selects the far path
// (1) for any addition and for subtraction with a difference above 1; the
// close path (0) takes subtraction with a difference of 0 or 1. one_d
// flags a difference of exactly 1. The outputs and the path rule follow
// the paper; the magnitude compare for the swap and the saturation are
// this design's. Purely combinational.
module norm_mix_pre
  import fp_pkg::*;
(
  input  logic [PREP_W-1:0] nA,
  input  logic [PREP_W-1:0] nB,
  input  logic              mixed,
  output logic              sub,
  output logic              path,
  output logic [EXP_W-1:0]  exp_large,
  output logic [4:0]        exp_diff,
  output logic [PREP_W-1:0] A,
  output logic [PREP_W-1:0] B,
  output logic              one_d
);
  prep_t     pa, pb, pA, pB;
  logic [9:0] diff;

  always_comb begin
    pa  = nA;
    pb  = nB;
    sub = pa.sign ^ pb.sign;
    if (mixed || {pa.exp, pa.sig} >= {pb.exp, pb.sig}) begin
      pA = pa;
      pB = pb;
    end else begin
      pA = pb;
      pB = pa;
    end
    if (mixed)
      diff = {2'b00, pA.exp} + {2'b00, pB.exp} - 10'd1;
    else
      diff = {2'b00, pA.exp} - {2'b00, pB.exp};
    exp_diff  = (diff > 10'd31) ? 5'd31 : diff[4:0];
    exp_large = pA.exp;
    one_d     = (diff == 10'd1);
    path      = !sub || (diff > 10'd1);
    A = pA;
    B = pB;
  end
endmodule
