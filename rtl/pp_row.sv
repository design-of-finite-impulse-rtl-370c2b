// pp_row: one row of the partial-product array, W AND gates that gate every
// bit of the multiplicand z with one multiplier bit y (out[j] = z[j] & y).
// Combinational. This is the row of AND gates of the source's partial-product
// stage, widened from the 8 bits drawn there to W.
module pp_row #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] z,
  input  logic         y,
  output logic [W-1:0] out
);
  for (genvar j = 0; j < W; j++) begin : g_and
    assign out[j] = z[j] & y;
  end
endmodule
