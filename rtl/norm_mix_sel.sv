// norm_mix_sel: picks the prepared operands for the normal/mixed datapath.
// In the mixed case it passes mixed_pre's pair and raises the mixed flag,
// which tells later stages that nB's exponent field is a negative-bias
// shift count; otherwise it passes norm_pre's pair. Follows the paper.
// Purely combinational.
module norm_mix_sel
  import fp_pkg::*;
(
  input  logic [PREP_W-1:0] nA_n,
  input  logic [PREP_W-1:0] nB_n,
  input  logic [PREP_W-1:0] nA_m,
  input  logic [PREP_W-1:0] nB_m,
  input  in_case_e          sel,
  output logic [PREP_W-1:0] nA,
  output logic [PREP_W-1:0] nB,
  output logic              mixed
);
  assign mixed = (sel == C_MIXED);
  assign nA    = mixed ? nA_m : nA_n;
  assign nB    = mixed ? nB_m : nB_n;
endmodule
