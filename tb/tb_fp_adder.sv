// tb_fp_adder: end-to-end test of the single-precision adder at its
// default configuration. It applies the four example additions of the
// design's waveforms (normal, denormal, mixed, and a huge number plus a
// small one), directed special cases, and random operand pairs of every
// kind, and compares s with the exact reference model of fp_ref_pkg. It
// counts how often each mechanism fired (every input case, both datapath
// paths, LOP correction, rounding up, carry-out renormalisation, overflow
// to infinity, denormal results from the normal datapath, a denormal sum
// carrying into the normal range) and counts a failure for any that never
// did. The adder is combinational: each vector is checked 1 ns after it is
// applied.
module tb_fp_adder;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;
  int n_case [4];
  int n_far, n_close, n_corr, n_round, n_carry, n_ovf, n_subn, n_d2n, n_mix_close;

  fp_adder dut (.a(a), .b(b), .s(s));

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp_s);
    a = x; b = y;
    #1ns;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 20)
        $display("FAIL a=%h b=%h s=%h expected %h (case %0d)", x, y, s, exp_s, dut.sel);
    end
    n_case[dut.sel]++;
    if (dut.sel == C_NORMAL || dut.sel == C_MIXED) begin
      if (dut.u_normalized_mixed.path) begin
        n_far++;
        if (dut.u_normalized_mixed.u_far.up) n_round++;
        if (!dut.u_normalized_mixed.sub && dut.u_normalized_mixed.u_far.cout) n_carry++;
        if (s[30:23] == 8'hFF) n_ovf++;
      end else begin
        n_close++;
        if (dut.u_normalized_mixed.u_close.corr) n_corr++;
        if (dut.sel == C_MIXED) n_mix_close++;
      end
      if (s[30:23] == 8'h00) n_subn++;
    end
    if (dut.sel == C_DENORM && s[23]) n_d2n++;
  endtask

  task automatic check_ref(input logic [31:0] x, input logic [31:0] y);
    apply(x, y, ref_add(x, y));
  endtask

  int ka, kb;
  logic [31:0] x;

  initial begin
    // The four example additions.
    apply(32'h41bb8937, 32'h45baf1c9, 32'h45bbad52);   // normal
    apply(32'h0031a76d, 32'h000001bd, 32'h0031a92a);   // denormal
    apply(32'h006ce3ee, 32'h02081cea, 32'h0215b968);   // mixed
    apply(32'hfb000000, 32'h41bb8937, 32'hfb000000);   // huge plus small
    // Exception table.
    apply(32'h00000000, 32'h41bb8937, 32'h41bb8937);   // zero + number
    apply(32'h7f800000, 32'h41bb8937, 32'h7f800000);   // inf + number
    apply(32'hff800000, 32'hff800000, 32'hff800000);   // inf + inf, same sign
    apply(32'h7f800000, 32'hff800000, QNAN);           // inf + inf, opposite
    apply(32'h7fb00000, 32'h7fc12345, QNAN);           // NaN + NaN
    // Directed arithmetic corner cases.
    check_ref(32'h7f7fffff, 32'h7f7fffff);             // overflow
    check_ref(32'h3f800000, 32'hbf800000);             // exact zero
    check_ref(32'h00800000, 32'h80000001);             // normal - denormal -> denormal
    check_ref(32'h00800001, 32'h80800000);             // close path, denormal result
    check_ref(32'h3f800000, 32'h33800000);             // tie, round to even
    check_ref(32'h3f800001, 32'h33800000);             // tie, round up
    check_ref(32'h4b7fffff, 32'h3f000000);             // round up carries out
    check_ref(32'h00400000, 32'h00400000);             // denormal sum becomes normal
    // Random pairs of every kind.
    for (int i = 0; i < 1000000; i++) begin
      ka = $urandom_range(0, 99);
      kb = $urandom_range(0, 99);
      ka = (ka < 50) ? 0 : (ka < 75) ? 1 : (ka < 85) ? 5 : (ka < 90) ? 2 : (ka < 95) ? 3 : 4;
      kb = (kb < 50) ? 0 : (kb < 75) ? 1 : (kb < 85) ? 5 : (kb < 90) ? 2 : (kb < 95) ? 3 : 4;
      x = rand_op(ka);
      if (ka == 0 && $urandom_range(0, 2) == 0)
        check_ref(x, near_op(x));
      else
        check_ref(x, rand_op(kb));
    end
    $display("cases: normal=%0d denormal=%0d mixed=%0d exception=%0d",
             n_case[0], n_case[1], n_case[2], n_case[3]);
    $display("far=%0d close=%0d lop_correction=%0d round_up=%0d carry_out=%0d overflow=%0d denormal_result=%0d denormal_to_normal=%0d mixed_close=%0d",
             n_far, n_close, n_corr, n_round, n_carry, n_ovf, n_subn, n_d2n, n_mix_close);
    foreach (n_case[i]) if (n_case[i] == 0) failures++;
    if (n_far == 0 || n_close == 0 || n_corr == 0 || n_round == 0 || n_carry == 0 ||
        n_ovf == 0 || n_subn == 0 || n_d2n == 0 || n_mix_close == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
