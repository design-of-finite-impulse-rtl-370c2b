// wallace_mult: W x W unsigned combinational multiplier, p = a * b.
// Three parts in series: pp_gen forms the W x W AND-gate partial products,
// rcw_tree compresses them with a reduced-complexity Wallace tree of full and
// half adders to two rows, and sqrt_csla, a square-root carry-select adder,
// adds those rows into the 2W-bit product. No clock, no registers: the result
// settles one combinational path after the inputs change.
// The structure follows the source; unsigned operands and the plain,
// unpipelined form are taken from its 16-bit simulation example.
module wallace_mult #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  logic [W-1:0][W-1:0] pp;
  logic [2*W-1:0]      row0, row1;
  logic                unused_cout;

  pp_gen   #(.W(W))   u_pp   (.a(a), .b(b), .pp(pp));
  rcw_tree #(.W(W))   u_tree (.pp(pp), .row0(row0), .row1(row1));
  // The product of two W-bit numbers fits in 2W bits: the carry out is 0.
  sqrt_csla #(.N(2*W)) u_add (.a(row0), .b(row1), .cin(1'b0), .sum(p), .cout(unused_cout));
endmodule
