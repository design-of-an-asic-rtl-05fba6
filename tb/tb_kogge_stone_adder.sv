// tb_kogge_stone_adder: checks the 24-bit compound adder against integer
// addition: sum = a + b, sum1 = a + b + 1 and both carry outs, for corner
// values and random operands.
module tb_kogge_stone_adder;
  localparam int unsigned W = 24;
  logic [W-1:0] a, b, sum, sum1;
  logic         cout, cout1;
  int checks = 0, failures = 0;
  logic [W:0]   e0, e1;

  kogge_stone_adder #(.W(W)) dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [W-1:0] x, input logic [W-1:0] y);
    a = x; b = y;
    #1ns;
    e0 = {1'b0, x} + {1'b0, y};
    e1 = {1'b0, x} + {1'b0, y} + 1;
    checks++;
    if ({cout, sum} !== e0 || {cout1, sum1} !== e1) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h: %b%h %b%h", x, y, cout, sum, cout1, sum1);
    end
  endtask

  initial begin
    run('0, '0);
    run('1, '0);
    run('1, '1);
    run('1, 24'h1);
    run(24'h800000, 24'h800000);
    run(24'h555555, 24'hAAAAAA);
    for (int i = 0; i < 20000; i++) run(W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
