// tb_norm_mix_sel: checks that the mixed case passes mixed_pre's pair and
// raises the mixed flag, and that every other case passes norm_pre's pair.
module tb_norm_mix_sel;
  import fp_pkg::*;
  logic [32:0] nA_n, nB_n, nA_m, nB_m, nA, nB;
  in_case_e    sel;
  logic        mixed;
  int checks = 0, failures = 0;

  norm_mix_sel dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      nA_n = {$urandom, 1'($urandom)}; nB_n = {$urandom, 1'($urandom)};
      nA_m = {$urandom, 1'($urandom)}; nB_m = {$urandom, 1'($urandom)};
      sel  = in_case_e'(i % 4);
      #1ns;
      checks++;
      if (sel == C_MIXED ? (nA !== nA_m || nB !== nB_m || mixed !== 1'b1)
                         : (nA !== nA_n || nB !== nB_n || mixed !== 1'b0)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d", sel);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
