// sqrt_csla: N-bit square-root carry-select adder (BEC form).
// The operands are cut into groups whose sizes grow by one: 2, 2, 3, 4, 5, ...,
// with the last group taking what is left (2,2,3,4,5,6,7,3 for N = 32). Group 0
// is a ripple-carry adder fed by cin. Every later group computes its sum once
// with carry-in 0 (rca) and derives the carry-in-1 result from it with a
// binary-to-excess-1 converter (bec) over {cout, sum}; the carry arriving from
// the group below selects one of the two with a multiplexer. The carry
// therefore crosses each group in one mux delay while the groups compute in
// parallel, their growing sizes matching the later arrival of the select.
// Combinational. The RCA/BEC/MUX group structure follows the source; the group
// sizes are the usual square-root split, this design's choice.
module sqrt_csla #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  // Size of group g: 2 for g = 0 and 1, then g + 1, clipped to the bits left.
  function automatic int gsize(int g);
    int lo, sz;
    lo = 0;
    for (int k = 0; k <= g; k++) begin
      sz = (k < 2) ? 2 : k + 1;
      if (lo + sz > N) sz = N - lo;
      if (k == g) return (sz < 0) ? 0 : sz;
      lo += sz;
    end
    return 0;
  endfunction

  function automatic int glow(int g);
    int lo;
    lo = 0;
    for (int k = 0; k < g; k++) lo += gsize(k);
    return lo;
  endfunction

  function automatic int ngroups();
    int g;
    g = 0;
    while (glow(g) < N) g++;
    return g;
  endfunction

  localparam int NG = ngroups();

  logic [NG:0] gc;   // gc[g] = carry into group g
  assign gc[0] = cin;

  for (genvar g = 0; g < NG; g++) begin : g_grp
    localparam int LO = glow(g);
    localparam int SZ = gsize(g);
    if (g == 0) begin : g_rca
      rca #(.N(SZ)) u_rca (
        .a(a[LO+:SZ]), .b(b[LO+:SZ]), .cin(gc[0]), .sum(sum[LO+:SZ]), .cout(gc[1])
      );
    end else begin : g_sel
      logic [SZ-1:0] s0;
      logic          c0;
      logic [SZ:0]   r1;   // {cout, sum} for carry-in 1
      rca #(.N(SZ)) u_rca (
        .a(a[LO+:SZ]), .b(b[LO+:SZ]), .cin(1'b0), .sum(s0), .cout(c0)
      );
      bec #(.N(SZ+1)) u_bec (.x({c0, s0}), .y(r1));
      assign sum[LO+:SZ] = gc[g] ? r1[SZ-1:0] : s0;
      assign gc[g+1]     = gc[g] ? r1[SZ]     : c0;
    end
  end

  assign cout = gc[NG];
endmodule
