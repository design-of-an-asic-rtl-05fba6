// lop: leading one predictor for the difference a - b with a > b.
// Instead of waiting for the subtraction, it looks at the operand bits: with
// the signed digit d[i] = a[i] - b[i], the indicator
//   f[i+1] = (a[i+1] ^ b[i+1]) & ~(~a[i] & b[i])
// marks where the leading 1 can be. The highest marked position p is exact
// or one too high: the difference lies in (2^(p-1), 2^(p+1)). The caller
// corrects that with a one-bit shift. The paper names an LOP for the
// close path; the indicator equation is this design's choice.
// Output lz is the predicted number of leading zeros. Purely combinational.
module lop #(
  parameter int unsigned W = 25
) (
  input  logic [W-1:0]         a,
  input  logic [W-1:0]         b,
  output logic [$clog2(W)-1:0] lz
);
  logic [W-1:0]           f;
  logic [$clog2(W+1)-1:0] cnt;

  always_comb begin
    f[0] = 1'b1;
    for (int i = 0; i < W-1; i++)
      f[i+1] = (a[i+1] ^ b[i+1]) & ~(~a[i] & b[i]);
  end

  lod #(.W(W)) u_lod (.x(f), .lz(cnt));

  assign lz = cnt[$clog2(W)-1:0];
endmodule
