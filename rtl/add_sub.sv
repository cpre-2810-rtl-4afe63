// add_sub: W-bit ripple-carry adder/subtractor (W = 8 in the i281).
//
// Computes S = X + Y when sub = 0 and S = X - Y when sub = 1. As in the
// document's figure, every Y bit passes through an XOR with sub before its
// full adder and sub also drives the carry-in c0, so subtraction adds the
// two's complement of Y. carry is c_W, the carry out of the last stage;
// overflow is c_W XOR c_(W-1). Combinational, one full adder per bit.
module add_sub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         sub,
  output logic [W-1:0] s,
  output logic         carry,
  output logic         overflow
);
  logic [W:0]   c;
  logic [W-1:0] y_eff;

  assign c[0]  = sub;
  assign y_eff = y ^ {W{sub}};

  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .a   (x[i]),
      .b   (y_eff[i]),
      .cin (c[i]),
      .s   (s[i]),
      .cout(c[i+1])
    );
  end

  assign carry    = c[W];
  assign overflow = c[W] ^ c[W-1];
endmodule
