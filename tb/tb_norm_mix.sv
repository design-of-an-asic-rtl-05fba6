// tb_norm_mix: checks the output packing of the normal/mixed datapath:
// far result when far is set, +0 for an exact close-path zero, close
// result otherwise, always with the given sign.
module tb_norm_mix;
  logic        sign, far, zero_close;
  logic [23:0] fracs_close, fracs_far;
  logic [7:0]  exps_close, exps_far;
  logic [31:0] s, e;
  int checks = 0, failures = 0;

  norm_mix dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      sign = 1'($urandom); far = 1'($urandom); zero_close = ($urandom_range(0, 3) == 0);
      fracs_close = 24'($urandom); fracs_far = 24'($urandom);
      exps_close = 8'($urandom); exps_far = 8'($urandom);
      #1ns;
      if (far) e = {sign, exps_far, fracs_far[22:0]};
      else if (zero_close) e = 32'h0;
      else e = {sign, exps_close, fracs_close[22:0]};
      checks++;
      if (s !== e) begin
        failures++;
        if (failures < 10) $display("FAIL s=%h expected %h", s, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
