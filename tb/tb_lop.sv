// tb_lop: checks the leading one predictor on 25-bit operand pairs a > b.
// The true leading-zero count of a - b must equal the prediction or the
// prediction plus one. Operand pairs include close values that cancel many
// bits. Also counts how often the prediction was exact and how often it was
// one short; both must occur.
module tb_lop;
  localparam int unsigned W = 25;
  logic [W-1:0]         a, b, t, d;
  logic [$clog2(W)-1:0] lz;
  int checks = 0, failures = 0, exact = 0, short1 = 0;
  int true_lz;

  lop #(.W(W)) dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 50000; i++) begin
      a = W'($urandom);
      case (i % 3)
        0: b = W'($urandom);
        1: b = a ^ (W'($urandom) >> $urandom_range(0, W));
        default: b = a - (W'($urandom) >> $urandom_range(0, W));
      endcase
      if (a < b) begin t = a; a = b; b = t; end
      if (a == b) continue;
      #1ns;
      d = a - b;
      true_lz = W - $clog2(64'(d) + 1);
      checks++;
      if (true_lz == int'(lz)) exact++;
      else if (true_lz == int'(lz) + 1) short1++;
      else begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h lz=%0d true %0d", a, b, lz, true_lz);
      end
    end
    $display("exact=%0d one_short=%0d", exact, short1);
    checks++;
    if (exact == 0 || short1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
