// tb_mixed_pre: checks the preparation of normal/denormal pairs in both
// orders. nA_m must be the normal operand with its implicit 1. nB_m must
// hold the denormal's sign, a shift count c in the exponent field, and a
// significand with MSB 1 that equals the denormal fraction shifted left by
// c, so that no value is lost.
module tb_mixed_pre;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  logic [31:0] a, b, n, d;
  op_type_e    outa, outb;
  logic [32:0] nA_m, nB_m;
  int checks = 0, failures = 0;
  logic [31:0] shifted;

  mixed_pre dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      n = rand_op(($urandom_range(0, 1) == 0) ? 0 : 5);
      d = rand_op(1);
      if (i % 2) begin
        a = n; b = d; outa = T_NORMAL; outb = T_DENORM;
      end else begin
        a = d; b = n; outa = T_DENORM; outb = T_NORMAL;
      end
      #1ns;
      shifted = 32'(d[22:0]) << nB_m[31:24];
      checks++;
      if (nA_m !== {n[31:23], 1'b1, n[22:0]} || nB_m[32] !== d[31] ||
          nB_m[23] !== 1'b1 || shifted !== {8'b0, nB_m[23:0]}) begin
        failures++;
        if (failures < 10) $display("FAIL n=%h d=%h nA_m=%h nB_m=%h", n, d, nA_m, nB_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
