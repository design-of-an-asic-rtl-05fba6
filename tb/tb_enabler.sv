// tb_enabler: checks operand classification and the input case for random
// operands of known kind (zero, denormal, normal, infinity, NaN).
module tb_enabler;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  logic [31:0] a, b;
  in_case_e    sel;
  op_type_e    outa, outb;
  int checks = 0, failures = 0;
  int ka, kb;
  op_type_e ta, tb;
  in_case_e ec;

  enabler dut (.*);

  function automatic op_type_e kind_type(input int k);
    case (k)
      0, 5: return T_NORMAL;
      1: return T_DENORM;
      2: return T_ZERO;
      default: return T_SPECIAL;
    endcase
  endfunction

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      ka = $urandom_range(0, 5);
      kb = $urandom_range(0, 5);
      a = rand_op(ka);
      b = rand_op(kb);
      #1ns;
      ta = kind_type(ka);
      tb = kind_type(kb);
      if (ka inside {2, 3, 4} || kb inside {2, 3, 4}) ec = C_EXCEPT;
      else if (ta == T_NORMAL && tb == T_NORMAL) ec = C_NORMAL;
      else if (ta == T_DENORM && tb == T_DENORM) ec = C_DENORM;
      else ec = C_MIXED;
      checks++;
      if (outa !== ta || outb !== tb || sel !== ec) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sel=%0d outa=%0d outb=%0d", a, b, sel, outa, outb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
