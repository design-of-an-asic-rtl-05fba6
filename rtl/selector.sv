// selector: output multiplexer. By the input case from the Enabler it
// passes the normal/mixed datapath result (normal and mixed cases), the
// denormal block result, or the exception block result. Follows the
// paper. Purely combinational.
module selector
  import fp_pkg::*;
(
  input  in_case_e    sel,
  input  logic [31:0] s_norm,
  input  logic [31:0] s_denorm,
  input  logic [31:0] s_exc,
  output logic [31:0] s
);
  always_comb begin
    unique case (sel)
      C_NORMAL, C_MIXED: s = s_norm;
      C_DENORM:          s = s_denorm;
      default:           s = s_exc;
    endcase
  end
endmodule
