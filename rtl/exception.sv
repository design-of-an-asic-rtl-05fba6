// exception: direct result for operands that need no arithmetic.
// Zero plus x gives x; infinity plus a finite number gives that infinity;
// two infinities give infinity when their signs agree and NaN otherwise;
// a NaN operand gives NaN. These rules follow the paper's table of
// exceptional cases. This design's own choices: NaN plus anything (not only
// NaN plus NaN) is NaN, the NaN produced is the quiet NaN 7FC00000, and
// zero plus zero is -0 only when both are -0 (round to nearest even).
// The result is only used when the Enabler reports the exception case.
// Purely combinational.
module exception
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  op_type_e    outa,
  input  op_type_e    outb,
  output logic [31:0] s
);
  logic  a_nan, b_nan, a_inf, b_inf;

  always_comb begin
    a_nan = (outa == T_SPECIAL) && (a[22:0] != '0);
    b_nan = (outb == T_SPECIAL) && (b[22:0] != '0);
    a_inf = (outa == T_SPECIAL) && (a[22:0] == '0);
    b_inf = (outb == T_SPECIAL) && (b[22:0] == '0);

    if (a_nan || b_nan)
      s = QNAN;
    else if (a_inf && b_inf)
      s = (a[31] == b[31]) ? a : QNAN;
    else if (a_inf)
      s = a;
    else if (b_inf)
      s = b;
    else if (outa == T_ZERO && outb == T_ZERO)
      s = {a[31] & b[31], 31'b0};
    else if (outa == T_ZERO)
      s = b;
    else
      s = a;
  end
endmodule
