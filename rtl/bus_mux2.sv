// bus_mux2: W-bit 2-to-1 bus multiplexer.
//
// Each output bit is (input_0 AND NOT select) OR (input_1 AND select), the
// one-bit gate-level multiplexer of the document repeated across the bus.
// The i281 uses it for the ALU's internal bus (shifter or adder result,
// selected by ALU_SELECT1) and for the datapath multiplexers c2, c11, c15,
// c16 and c18. Purely combinational.
module bus_mux2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic         sel,
  output logic [W-1:0] out
);
  always_comb begin
    for (int i = 0; i < W; i++)
      out[i] = (in0[i] & ~sel) | (in1[i] & sel);
  end
endmodule
