// tb_selector: checks that each input case selects its block's result:
// normal and mixed the normal/mixed datapath, denormal the denormal adder,
// exception the exception block.
module tb_selector;
  import fp_pkg::*;
  in_case_e    sel;
  logic [31:0] s_norm, s_denorm, s_exc, s, e;
  int checks = 0, failures = 0;

  selector dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = in_case_e'(i % 4);
      s_norm = $urandom; s_denorm = $urandom; s_exc = $urandom;
      #1ns;
      case (i % 4)
        0, 2: e = s_norm;
        1: e = s_denorm;
        default: e = s_exc;
      endcase
      checks++;
      if (s !== e) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d s=%h expected %h", sel, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
