// tb_fig8_cases: the example workloads of the design's evaluation, replayed
// as timed waveforms (one input pair per 50 ns step): a normal pair, a
// denormal pair, a mixed pair, and an exception sequence (equal normal
// operands, two large negative numbers, a large number plus a NaN, a large
// number plus a small one). Each output is compared with the published
// result where one is given (45bbad52, 0031a92a, 0215b968, fb000000) and
// otherwise with the reference model. The input case the enabler reports is
// checked as well.
module tb_fig8_cases;
  import fp_pkg::*;
  import fp_ref_pkg::*;

  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp_adder dut (.a(a), .b(b), .s(s));

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic [31:0] x, input logic [31:0] y, input logic [31:0] exp_s,
                      input in_case_e exp_case);
    a = x; b = y;
    #50ns;
    checks++;
    if (s !== exp_s || dut.sel !== exp_case) begin
      failures++;
      $display("FAIL a=%h b=%h s=%h expected %h, case %0d expected %0d", x, y, s, exp_s, dut.sel, exp_case);
    end else
      $display("ok   a=%h b=%h s=%h", x, y, s);
  endtask

  initial begin
    // Case 1: normal
    step(32'h41bb8937, 32'h45baf1c9, 32'h45bbad52, C_NORMAL);
    // Case 2: denormal
    step(32'h0031a76d, 32'h000001bd, 32'h0031a92a, C_DENORM);
    // Case 3: mixed; a plain FCA that drops the denormal would return b
    step(32'h006ce3ee, 32'h02081cea, 32'h0215b968, C_MIXED);
    checks++;
    if (s === 32'h02081cea) failures++;
    // Case 4: exception sequence
    step(32'h41bb8937, 32'h41bb8937, ref_add(32'h41bb8937, 32'h41bb8937), C_NORMAL);
    step(32'hfb000000, 32'hfb000000, ref_add(32'hfb000000, 32'hfb000000), C_NORMAL);
    step(32'hfb000000, 32'h7fb00000, QNAN, C_EXCEPT);
    step(32'hfb000000, 32'h41bb8937, 32'hfb000000, C_NORMAL);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
