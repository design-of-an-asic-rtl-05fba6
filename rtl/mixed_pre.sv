// mixed_pre: prepares a normal / denormal operand pair.
// The operand types from the Enabler tell which input is normal. The normal
// one gets the implicit 1. The denormal one gets an implicit 0 and is then
// partially normalised: a leading one detector counts the zeros above the
// leading 1 of its 24-bit significand and a barrel shifter shifts it left
// by that count, so its MSB is 1. The count is placed in the exponent
// field. It stands for a negative exponent: the value is
// 1.f * 2^(-126 - count). That follows the paper. This design's choice
// is the output order: nA_m always holds the normal operand and nB_m the
// shifted denormal, so later stages know which exponent is negative.
// Outputs are only meaningful in the mixed case. Purely combinational.
module mixed_pre
  import fp_pkg::*;
(
  input  logic [31:0]       a,
  input  logic [31:0]       b,
  input  op_type_e          outa,
  input  op_type_e          outb,
  output logic [PREP_W-1:0] nA_m,
  output logic [PREP_W-1:0] nB_m
);
  fp32_t            fn, fd;
  logic [4:0]       lz;
  logic [SIG_W-1:0] dsig;
  logic             unused_lost;
  logic             unused_type;

  assign unused_type = ^{outb, fd.exp};
  assign fn = (outa == T_NORMAL) ? a : b;
  assign fd = (outa == T_NORMAL) ? b : a;

  lod #(.W(SIG_W)) u_lod (.x({1'b0, fd.frac}), .lz(lz));

  barrel_shifter #(.W(SIG_W), .SW(5), .LEFT(1'b1)) u_shl (
    .x({1'b0, fd.frac}), .amt(lz), .y(dsig), .lost(unused_lost)
  );

  assign nA_m = {fn.sign, fn.exp, 1'b1, fn.frac};
  assign nB_m = {fd.sign, 3'b000, lz, dsig};
endmodule
