// norm_mix: final multiplexer of the normal/mixed datapath. It takes the
// far-path result when far is set and the close-path result otherwise, and
// packs {sign, exponent, 23-bit fraction}. An exact zero from the close
// path becomes +0 (round to nearest even). The sign is the sign of the
// larger operand. The far/close choice follows the paper; the zero rule
// and the separate sign input are this design's. Purely combinational.
module norm_mix
  import fp_pkg::*;
(
  input  logic             sign,
  input  logic             far,
  input  logic [SIG_W-1:0] fracs_close,
  input  logic [EXP_W-1:0] exps_close,
  input  logic             zero_close,
  input  logic [SIG_W-1:0] fracs_far,
  input  logic [EXP_W-1:0] exps_far,
  output logic [31:0]      s
);
  logic unused_msb;
  assign unused_msb = fracs_close[SIG_W-1] ^ fracs_far[SIG_W-1];

  always_comb begin
    if (far)
      s = {sign, exps_far, fracs_far[FRAC_W-1:0]};
    else if (zero_close)
      s = 32'h0000_0000;
    else
      s = {sign, exps_close, fracs_close[FRAC_W-1:0]};
  end
endmodule
