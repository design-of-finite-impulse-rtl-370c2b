// rca: N-bit ripple-carry adder built from full_adder cells.
// sum = a + b + cin, cout is the carry out of the top bit. Combinational.
// Used inside the carry-select adder for the first group and for the
// carry-in-0 sum of every later group.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[N];
endmodule
