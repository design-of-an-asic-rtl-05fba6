// tb_denormalized: checks the denormal adder on random denormal pairs of
// both signs, including the example pair of the design's waveforms and
// sums that carry into the smallest normal exponent.
module tb_denormalized;
  import fp_ref_pkg::*;
  logic [31:0] a, b, s, e;
  int checks = 0, failures = 0, to_normal = 0;

  denormalized dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    #1ns;
    e = ref_add(x, y);
    checks++;
    if (s[23]) to_normal++;
    if (s !== e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h expected %h", x, y, s, e);
    end
  endtask

  initial begin
    run(32'h0031a76d, 32'h000001bd);
    run(32'h00400000, 32'h00400000);
    run(32'h80400000, 32'h00400000);
    for (int i = 0; i < 20000; i++) run(rand_op(1), rand_op(1));
    checks++;
    if (to_normal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
