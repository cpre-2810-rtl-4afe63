// full_adder: one-bit full adder, the FA cell of the ripple-carry chain.
// s = a ^ b ^ cin, cout = majority(a, b, cin). Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
