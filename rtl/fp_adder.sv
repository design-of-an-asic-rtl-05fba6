// fp_adder: IEEE 754 single-precision adder, s = a + b, rounded to nearest
// even. It is purely combinational: s settles one adder delay after a or b
// changes; there is no clock.
// The Enabler sorts the input pair into one of four cases: both normal,
// both denormal, mixed, or exception. Three result blocks work on every pair
// in parallel: the normal/mixed datapath (far-and-close path algorithm),
// the denormal adder, and the exception table. The Selector then keeps the
// one that matches the case. Mixed pairs take the normal datapath after the
// denormal operand is pre-normalised. The structure follows the paper.
module fp_adder
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] s
);
  in_case_e    sel;
  op_type_e    outa, outb;
  logic [31:0] s_norm, s_denorm, s_exc;

  enabler u_enabler (.a(a), .b(b), .sel(sel), .outa(outa), .outb(outb));

  normalized_mixed u_normalized_mixed (
    .a(a), .b(b), .sel(sel), .outa(outa), .outb(outb), .s(s_norm)
  );

  denormalized u_denormalized (.a(a), .b(b), .s(s_denorm));

  exception u_exception (.a(a), .b(b), .outa(outa), .outb(outb), .s(s_exc));

  selector u_selector (
    .sel(sel), .s_norm(s_norm), .s_denorm(s_denorm), .s_exc(s_exc), .s(s)
  );
endmodule
