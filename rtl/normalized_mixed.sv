// normalized_mixed: datapath for normal/normal and normal/denormal inputs.
// Preparation: the norm_pre step (inline wiring) and mixed_pre prepare both kinds of pairs in
// parallel, norm_mix_sel picks one by the input case, and norm_mix_pre
// orders the operands and picks the path. Computation: the close path
// (subtraction, exponent difference 0 or 1) and the far path (all else)
// both run, and norm_mix keeps the one chosen. The structure follows the
// paper. The result is only used for the normal and mixed cases.
// Purely combinational.
module normalized_mixed
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  in_case_e    sel,
  input  op_type_e    outa,
  input  op_type_e    outb,
  output logic [31:0] s
);
  logic [PREP_W-1:0] nA_n, nB_n, nA_m, nB_m, nA, nB, A, B;
  logic              mixed, sub, path, one_d, zero_close;
  logic [EXP_W-1:0]  exp_large, exps_close, exps_far;
  logic [4:0]        exp_diff;
  logic [SIG_W-1:0]  fracs_close, fracs_far;
  prep_t             pA, pB;
  logic              unused_b;

  // norm_pre step: both operands as normal numbers, implicit 1 inserted
  // between exponent and fraction. It is pure wiring, so it sits here.
  assign nA_n = {a[31:23], 1'b1, a[22:0]};
  assign nB_n = {b[31:23], 1'b1, b[22:0]};

  mixed_pre u_mixed_pre (
    .a(a), .b(b), .outa(outa), .outb(outb), .nA_m(nA_m), .nB_m(nB_m)
  );

  norm_mix_sel u_sel (
    .nA_n(nA_n), .nB_n(nB_n), .nA_m(nA_m), .nB_m(nB_m), .sel(sel),
    .nA(nA), .nB(nB), .mixed(mixed)
  );

  norm_mix_pre u_pre (
    .nA(nA), .nB(nB), .mixed(mixed), .sub(sub), .path(path),
    .exp_large(exp_large), .exp_diff(exp_diff), .A(A), .B(B), .one_d(one_d)
  );

  assign pA = A;
  assign pB = B;
  assign unused_b = pB.sign ^ (^pB.exp) ^ (^pA.exp);

  close_path u_close (
    .fracA(pA.sig), .fracB(pB.sig), .exp_large(exp_large), .one_d(one_d),
    .fracs_close(fracs_close), .exps_close(exps_close), .zero_close(zero_close)
  );

  far_path u_far (
    .fracA(pA.sig), .fracB(pB.sig), .exp_large(exp_large), .exp_diff(exp_diff),
    .sub(sub), .fracs_far(fracs_far), .exps_far(exps_far)
  );

  norm_mix u_norm_mix (
    .sign(pA.sign), .far(path),
    .fracs_close(fracs_close), .exps_close(exps_close), .zero_close(zero_close),
    .fracs_far(fracs_far), .exps_far(exps_far), .s(s)
  );
endmodule
