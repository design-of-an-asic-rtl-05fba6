// lod: leading one detector. Counts the zeros above the most significant 1
// of x; lz = W when x is zero. The paper uses an LOD to measure how far
// a denormal significand must be shifted; its structure is not given, so
// this is a plain priority search that synthesis turns into a tree.
// Purely combinational.
module lod #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0]           x,
  output logic [$clog2(W+1)-1:0] lz
);
  always_comb begin
    lz = ($clog2(W+1))'(W);
    for (int i = 0; i < W; i++)
      if (x[i]) lz = ($clog2(W+1))'(W - 1 - i);
  end
endmodule
