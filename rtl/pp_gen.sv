// pp_gen: partial-product generation stage of the W x W unsigned multiplier.
// W rows of AND gates (pp_row); row i gates the multiplicand a with
// multiplier bit b[i], so pp[i][j] = a[j] & b[i] carries weight 2^(i+j).
// Combinational, no clock. The AND-row structure follows the source; the
// packing of the result as a W x W array is this design's choice.
module pp_gen #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]        a,
  input  logic [W-1:0]        b,
  output logic [W-1:0][W-1:0] pp   // pp[row i][bit j]
);
  for (genvar i = 0; i < W; i++) begin : g_row
    pp_row #(.W(W)) u_row (.z(a), .y(b[i]), .out(pp[i]));
  end
endmodule
