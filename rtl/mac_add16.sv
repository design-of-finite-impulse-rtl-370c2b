// mac_add16: multiply-accumulate unit around one W x W Wallace multiplier.
// prod is the combinational product A * B. Each rising clock edge registers it
// in mult and adds the previous mult into accum (accum <= accum + mult), so an
// operand pair presented in cycle t reaches accum at the end of cycle t+1.
// RES presents accum. Widths are 2W = 32 bits; accum wraps modulo 2^32.
// reset is synchronous and active high and clears mult and accum.
// The port names and widths follow the source's 16-bit MAC simulation; the
// register pipeline and the reset style are this design's own choices.
module mac_add16 #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           reset,
  input  logic [W-1:0]   A,
  input  logic [W-1:0]   B,
  output logic [2*W-1:0] prod,
  output logic [2*W-1:0] mult,
  output logic [2*W-1:0] accum,
  output logic [2*W-1:0] RES
);
  wallace_mult #(.W(W)) u_mult (.a(A), .b(B), .p(prod));

  always_ff @(posedge clk) begin
    if (reset) begin
      mult  <= '0;
      accum <= '0;
    end else begin
      mult  <= prod;
      accum <= accum + mult;
    end
  end

  assign RES = accum;
endmodule
