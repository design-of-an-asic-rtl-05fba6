// kogge_stone_adder: compound adder giving a+b and a+b+1 at once.
// A Kogge-Stone parallel-prefix tree of black cells only (log2(W) levels,
// five for the default 24 bits) forms every group generate G[i:0] and group
// propagate P[i:0] in parallel. With p = a ^ b the two sums are
//   sum[i]  = p[i] ^ G[i-1:0]
//   sum1[i] = sum[i] ^ P[i-1:0]
// because G and P of one group never both hold. The width, the prefix
// structure and both sum equations follow the paper; the carry outputs
// are this design's addition. Purely combinational.
module kogge_stone_adder #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,    // a + b      (mod 2^W)
  output logic [W-1:0] sum1,   // a + b + 1  (mod 2^W)
  output logic         cout,   // carry out of a + b
  output logic         cout1   // carry out of a + b + 1
);
  localparam int unsigned LV = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [LV+1];
  logic [W-1:0] p [LV+1];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < LV; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= D) begin : g_black
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-D]);
        assign p[l+1][i] = p[l][i] & p[l][i-D];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // Group signals of bits [i-1:0], with nothing below bit 0.
  logic [W-1:0] gin, pin;
  assign gin = {g[LV][W-2:0], 1'b0};
  assign pin = {p[LV][W-2:0], 1'b1};

  assign sum   = p[0] ^ gin;
  assign sum1  = sum ^ pin;
  assign cout  = g[LV][W-1];
  assign cout1 = g[LV][W-1] | p[LV][W-1];
endmodule
