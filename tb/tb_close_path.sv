// tb_close_path: checks the close path on normal pairs of opposite sign
// whose exponents differ by 0 or 1, larger magnitude first, including
// small exponents that give denormal results. The expected fraction and
// exponent come from the reference model; an exact zero must raise
// zero_close. Also counts LOP corrections, rounded results and denormal
// results; each must occur.
module tb_close_path;
  import fp_ref_pkg::*;
  logic [23:0] fracA, fracB, fracs_close;
  logic [7:0]  exp_large, exps_close;
  logic        one_d, zero_close;
  int checks = 0, failures = 0, n_corr = 0, n_round = 0, n_den = 0;
  logic [31:0] x, y, t, r;

  close_path dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      x = rand_op(i % 4 == 0 ? 5 : 0);
      y = near_op(x);
      y[31] = ~x[31];
      if (y[30:0] > x[30:0]) begin t = x; x = y; y = t; end
      if (x[30:23] - y[30:23] > 1) continue;
      fracA = {1'b1, x[22:0]};
      fracB = {1'b1, y[22:0]};
      exp_large = x[30:23];
      one_d = (x[30:23] != y[30:23]);
      #1ns;
      r = ref_add(x, y);
      if (dut.corr) n_corr++;
      if (dut.sh == 0 && dut.guard) n_round++;
      if (r[30:23] == 0 && r[22:0] != 0) n_den++;
      checks++;
      if (r[30:0] == 0 ? !zero_close
                       : (zero_close || fracs_close !== {r[30:23] != 0, r[22:0]} || exps_close !== r[30:23])) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h frac=%h exp=%h expected %h", x, y, fracs_close, exps_close, r);
      end
    end
    $display("corrections=%0d rounded=%0d denormal=%0d", n_corr, n_round, n_den);
    checks++;
    if (n_corr == 0 || n_round == 0 || n_den == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
