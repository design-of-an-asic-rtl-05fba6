// tb_normalized_mixed: checks the whole normal/mixed datapath on random
// normal pairs, cancelling pairs and normal/denormal pairs in both orders,
// including the mixed example of the design's waveforms. The case and
// operand types are supplied by the testbench from how each operand was
// made; the expected sum comes from the reference model.
module tb_normalized_mixed;
  import fp_pkg::*;
  import fp_ref_pkg::*;
  logic [31:0] a, b, s, e;
  in_case_e    sel;
  op_type_e    outa, outb;
  int checks = 0, failures = 0, n_mixed = 0, n_norm = 0;

  normalized_mixed dut (.*);

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] x, input logic da, input logic [31:0] y, input logic db);
    a = x; b = y;
    outa = da ? T_DENORM : T_NORMAL;
    outb = db ? T_DENORM : T_NORMAL;
    sel  = (da || db) ? C_MIXED : C_NORMAL;
    #1ns;
    e = ref_add(x, y);
    if (sel == C_MIXED) n_mixed++; else n_norm++;
    checks++;
    if (s !== e) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h s=%h expected %h", x, y, s, e);
    end
  endtask

  logic [31:0] x;
  initial begin
    run(32'h006ce3ee, 1'b1, 32'h02081cea, 1'b0);
    run(32'h41bb8937, 1'b0, 32'h45baf1c9, 1'b0);
    for (int i = 0; i < 30000; i++) begin
      x = rand_op(i % 4 == 0 ? 5 : 0);
      case (i % 4)
        0: run(x, 1'b0, rand_op(0), 1'b0);
        1: run(x, 1'b0, near_op(x), 1'b0);
        2: run(x, 1'b0, rand_op(1), 1'b1);
        default: run(rand_op(1), 1'b1, rand_op(5), 1'b0);
      endcase
    end
    checks++;
    if (n_mixed == 0 || n_norm == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
