// bec: N-bit binary-to-excess-1 converter, y = x + 1 (mod 2^N).
// Bit i flips when all bits below it are 1: y[i] = x[i] ^ &x[i-1:0].
// In the carry-select adder it turns the carry-in-0 group result {cout, sum}
// into the carry-in-1 result without a second ripple adder. Combinational.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);
  logic [N-1:0] all1;   // all1[i] = &x[i-1:0]
  assign all1[0] = 1'b1;
  for (genvar i = 0; i < N; i++) begin : g_bit
    assign y[i] = x[i] ^ all1[i];
    if (i + 1 < N) begin : g_chain
      assign all1[i+1] = all1[i] & x[i];
    end
  end
endmodule
