// enabler: classifies the two operands and the input case.
// Each operand is zero, denormal (exponent 0, fraction not 0), normal, or
// special (exponent all ones: infinity or NaN); outa / outb carry that type.
// sel names the input case: both normal, both denormal, mixed (one of
// each), or exception (any zero, infinity or NaN). The four cases and the
// signal names follow the paper; the 2-bit codes are this design's
// (see fp_pkg). Purely combinational.
module enabler
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output in_case_e    sel,
  output op_type_e    outa,
  output op_type_e    outb
);
  function automatic op_type_e classify(input logic [30:0] x);
    if (x[30:23] == '1)       return T_SPECIAL;
    else if (x[30:23] != '0)  return T_NORMAL;
    else if (x[22:0] != '0)   return T_DENORM;
    else                    return T_ZERO;
  endfunction

  logic unused_sign;
  assign unused_sign = a[31] ^ b[31];

  always_comb begin
    outa = classify(a[30:0]);
    outb = classify(b[30:0]);
    if (outa == T_ZERO || outa == T_SPECIAL || outb == T_ZERO || outb == T_SPECIAL)
      sel = C_EXCEPT;
    else if (outa == T_NORMAL && outb == T_NORMAL)
      sel = C_NORMAL;
    else if (outa == T_DENORM && outb == T_DENORM)
      sel = C_DENORM;
    else
      sel = C_MIXED;
  end
endmodule
