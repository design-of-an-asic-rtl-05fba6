// tb_barrel_shifter: checks a 24-bit left shifter and a 27-bit right
// shifter (the two uses in the adder) for every shift amount against wide
// integer shifts, including the flag for bits shifted out.
module tb_barrel_shifter;
  logic [23:0] xl, yl;
  logic [26:0] xr, yr;
  logic [4:0]  amt;
  logic        lostl, lostr;
  int checks = 0, failures = 0;
  logic [63:0] wl;
  logic [63:0] wr;

  barrel_shifter #(.W(24), .SW(5), .LEFT(1'b1)) u_l (.x(xl), .amt(amt), .y(yl), .lost(lostl));
  barrel_shifter #(.W(27), .SW(5), .LEFT(1'b0)) u_r (.x(xr), .amt(amt), .y(yr), .lost(lostr));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      xl  = 24'($urandom) >> $urandom_range(0, 23);
      xr  = 27'($urandom) >> $urandom_range(0, 26);
      amt = 5'($urandom);
      #1ns;
      wl = 64'(xl) << amt;              // bits 23:0 kept, above lost
      wr = {37'b0, xr} << 32 >> amt;    // bits 58:32 kept, below lost
      checks++;
      if (yl !== wl[23:0] || lostl !== (wl[63:24] != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL left x=%h amt=%0d y=%h lost=%b", xl, amt, yl, lostl);
      end
      checks++;
      if (yr !== wr[58:32] || lostr !== (wr[31:0] != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL right x=%h amt=%0d y=%h lost=%b", xr, amt, yr, lostr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
