// tb_exception: checks the exception block on pairs where at least one
// operand is zero, infinity or NaN, against the reference model, with the
// operand types supplied as the Enabler would.
module tb_exception;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  logic [31:0] a, b, s, e;
  op_type_e    outa, outb;
  int checks = 0, failures = 0;
  int ka, kb;

  exception dut (.*);

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
      kb = $urandom_range(2, 4);
      if (i % 2) begin int t = ka; ka = kb; kb = t; end
      a = rand_op(ka);
      b = rand_op(kb);
      outa = kind_type(ka);
      outb = kind_type(kb);
      #1ns;
      e = ref_add(a, b);
      checks++;
      if (s !== e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h s=%h expected %h", a, b, s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
