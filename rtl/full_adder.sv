// full_adder: one-bit full adder, the 3:2 counter of the Wallace tree.
// s = a ^ b ^ cin, co = majority(a, b, cin). Purely combinational.
// The source uses full adders to add three bits; the gate form is the usual one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic co
);
  assign s  = a ^ b ^ cin;
  assign co = (a & b) | (a & cin) | (b & cin);
endmodule
