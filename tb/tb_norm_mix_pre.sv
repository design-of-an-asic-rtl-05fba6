// tb_norm_mix_pre: checks operand ordering, effective operation, path,
// larger exponent and exponent difference. Normal pairs: the expected
// order comes from comparing the IEEE bit patterns as magnitudes, the
// difference from the two exponents. Mixed pairs: the denormal is prepared
// in the testbench (shifted until its MSB is 1), and its true exponent
// 1 - shift gives the expected difference.
module tb_norm_mix_pre;
  import fp_ref_pkg::*;
  logic [32:0] nA, nB, A, B;
  logic        mixed, sub, path, one_d;
  logic [7:0]  exp_large;
  logic [4:0]  exp_diff;
  int checks = 0, failures = 0, n_close = 0, n_far = 0;
  logic [31:0] x, y, big, little;
  int          ediff, c;
  logic [23:0] sig;
  logic        ok;

  norm_mix_pre dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 10000; i++) begin
      x = rand_op(i % 3 == 0 ? 5 : 0);
      if (i % 2 == 0) begin
        y = (i % 4 == 0) ? near_op(x) : rand_op(i % 3 == 0 ? 5 : 0);
        nA = {x[31:23], 1'b1, x[22:0]};
        nB = {y[31:23], 1'b1, y[22:0]};
        mixed = 1'b0;
        if (x[30:0] >= y[30:0]) begin big = x; little = y; end
        else begin big = y; little = x; end
        #1ns;
        ediff = int'(big[30:23]) - int'(little[30:23]);
        ok = (A === {big[31:23], 1'b1, big[22:0]}) && (B === {little[31:23], 1'b1, little[22:0]});
      end else begin
        y = rand_op(1);
        c = 0;
        sig = {1'b0, y[22:0]};
        while (!sig[23]) begin sig = sig << 1; c++; end
        nA = {x[31:23], 1'b1, x[22:0]};
        nB = {y[31], 8'(c), sig};
        mixed = 1'b1;
        big = x;
        #1ns;
        ediff = int'(x[30:23]) - (1 - c);
        ok = (A === nA) && (B === nB);
      end
      ok = ok && (sub === (x[31] ^ y[31])) && (exp_large === big[30:23]) &&
           (int'(exp_diff) == ((ediff > 31) ? 31 : ediff)) && (one_d === (ediff == 1)) &&
           (path === (!(x[31] ^ y[31]) || ediff > 1));
      if (path) n_far++; else n_close++;
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL nA=%h nB=%h mixed=%b A=%h B=%h diff=%0d", nA, nB, mixed, A, B, exp_diff);
      end
    end
    checks++;
    if (n_far == 0 || n_close == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
