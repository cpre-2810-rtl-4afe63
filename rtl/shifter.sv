// shifter: W-bit one-place shifter of the ALU (W = 8 in the i281).
//
// right = 0 (the L input of the L/R pin) shifts every bit one place towards
// the most significant end; right = 1 shifts towards the least significant
// end. The vacated bit is filled with 0 and the bit pushed out is given on
// shift_out, which the ALU passes to the carry flag. The document names the
// block, its L/R pin and its shift-out output; the zero fill is this
// design's choice. Combinational.
module shifter #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] d,
  input  logic         right,
  output logic [W-1:0] q,
  output logic         shift_out
);
  always_comb begin
    if (right) begin
      q         = {1'b0, d[W-1:1]};
      shift_out = d[0];
    end else begin
      q         = {d[W-2:0], 1'b0};
      shift_out = d[W-1];
    end
  end
endmodule
