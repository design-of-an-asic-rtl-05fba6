// tb_lod: checks the leading one detector. The expected count comes from
// $clog2: for x > 0 the leading 1 is at floor(log2 x) = $clog2(x+1) - 1.
module tb_lod;
  localparam int unsigned W = 24;
  logic [W-1:0]           x;
  logic [$clog2(W+1)-1:0] lz;
  int checks = 0, failures = 0;
  int exp_lz;

  lod #(.W(W)) dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x = W'($urandom) >> $urandom_range(0, W);
      if (i < W) x = W'(1) << i;
      #1ns;
      exp_lz = (x == 0) ? W : W - $clog2(64'(x) + 1);
      checks++;
      if (int'(lz) != exp_lz) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h lz=%0d expected %0d", x, lz, exp_lz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
