// barrel_shifter: logarithmic shifter, SW stages each shifting by a power of
// two, left (LEFT = 1) or right (LEFT = 0), filling with zeros. It also
// reports whether any 1 was shifted out (lost), which the far path uses as
// the sticky bit. The paper names barrel shifters for all shifts of the
// adder; the stage structure and the lost output are this design's choice.
// Purely combinational.
module barrel_shifter #(
  parameter int unsigned W    = 24,
  parameter int unsigned SW   = 5,
  parameter bit          LEFT = 1'b1
) (
  input  logic [W-1:0]  x,
  input  logic [SW-1:0] amt,
  output logic [W-1:0]  y,
  output logic          lost
);
  logic [W-1:0] st [SW+1];
  logic [SW:0]  lo;

  assign st[0] = x;
  assign lo[0] = 1'b0;

  for (genvar k = 0; k < SW; k++) begin : g_stage
    localparam int unsigned D = 1 << k;
    logic [W-1:0] shifted;
    logic         out_bits;
    if (D >= W) begin : g_all
      assign shifted  = '0;
      assign out_bits = |st[k];
    end else if (LEFT) begin : g_left
      assign shifted  = st[k] << D;
      assign out_bits = |st[k][W-1 -: D];
    end else begin : g_right
      assign shifted  = st[k] >> D;
      assign out_bits = |st[k][D-1:0];
    end
    assign st[k+1] = amt[k] ? shifted : st[k];
    assign lo[k+1] = lo[k] | (amt[k] & out_bits);
  end

  assign y    = st[SW];
  assign lost = lo[SW];
endmodule
