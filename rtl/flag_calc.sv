// flag_calc: zero and negative flags of an ALU result.
//
// zero is the NOR of all result bits; negative is the result's most
// significant bit, its sign in two's complement. Both follow the document's
// flag calculator figure. Combinational.
module flag_calc #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] result,
  output logic         zero,
  output logic         negative
);
  assign zero     = ~(|result);
  assign negative = result[W-1];
endmodule
