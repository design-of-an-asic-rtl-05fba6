// tb_far_path: checks the far path on normal pairs, larger magnitude
// first: additions with any exponent difference and subtractions with a
// difference above 1, including overflow to infinity and subtractions that
// fall below the normal range. The expected fraction and exponent come from
// the reference model. Carry out, left normalisation, rounding up and
// overflow must each occur.
module tb_far_path;
  import fp_ref_pkg::*;
  logic [23:0] fracA, fracB, fracs_far;
  logic [7:0]  exp_large, exps_far;
  logic [4:0]  exp_diff;
  logic        sub;
  int checks = 0, failures = 0, n_carry = 0, n_left = 0, n_up = 0, n_ovf = 0;
  logic [31:0] x, y, t, r;
  int d;

  far_path dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      x = rand_op(i % 5 == 0 ? 5 : 0);
      case (i % 3)
        0: y = rand_op(i % 5 == 0 ? 5 : 0);
        1: begin
          y = x;
          d = int'(x[30:23]) - $urandom_range(0, 30);
          y[30:23] = 8'((d < 1) ? 1 : d);
          y[22:0]  = $urandom;
          y[31]    = 1'($urandom);
        end
        default: y = near_op(x);
      endcase
      if (i % 97 == 0) begin x[30:23] = 8'hFE; y[30:23] = 8'hFE - 8'($urandom_range(0, 3)); y[31] = x[31]; end
      if (y[30:0] > x[30:0]) begin t = x; x = y; y = t; end
      d = int'(x[30:23]) - int'(y[30:23]);
      if (x[31] != y[31] && d < 2) continue;
      fracA = {1'b1, x[22:0]};
      fracB = {1'b1, y[22:0]};
      exp_large = x[30:23];
      exp_diff = 5'((d > 31) ? 31 : d);
      sub = x[31] ^ y[31];
      #1ns;
      r = ref_add(x, y);
      if (!sub && dut.cout) n_carry++;
      if (sub && !dut.upper[23]) n_left++;
      if (dut.up) n_up++;
      if (r[30:23] == 8'hFF) n_ovf++;
      checks++;
      if (fracs_far !== {r[30:23] != 0 && r[30:23] != 8'hFF, r[22:0]} || exps_far !== r[30:23]) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h frac=%h exp=%h expected %h", x, y, fracs_far, exps_far, r);
      end
    end
    $display("carry=%0d left=%0d round_up=%0d overflow=%0d", n_carry, n_left, n_up, n_ovf);
    checks++;
    if (n_carry == 0 || n_left == 0 || n_up == 0 || n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
