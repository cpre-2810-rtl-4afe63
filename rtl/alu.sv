// alu: the i281 arithmetic logic unit.
//
// Four operations, chosen by ALU_SELECT1/ALU_SELECT0 (control lines c12 and
// c13): 00 shift left, 01 shift right, 10 add, 11 subtract (used by both
// SUB and CMP). The first operand feeds both the shifter and the adder's X
// input; the second operand feeds only the adder's Y input. ALU_SELECT0 is
// the shifter's L/R pin and the adder's add/sub pin at once, and
// ALU_SELECT1 picks the shifter (0) or the adder (1) on the internal ALU bus
// multiplexer. The carry output is the shifter's shift-out for a shift and
// the adder's carry otherwise; overflow is 0 for a shift. Zero and negative
// come from the selected result. All of this follows the document's ALU
// figures. Combinational: the single-cycle CPU latches the flags at the
// clock edge through the flags register.
module alu
  import i281_pkg::*;
(
  input  data_t   a,
  input  data_t   b,
  input  alu_op_e op,
  output data_t   result,
  output flags_t  flags
);
  logic  sel1, sel0;
  data_t shift_q, sum;
  logic  shift_out, add_carry, add_overflow;
  logic  zero, negative;

  assign sel1 = op[1];
  assign sel0 = op[0];

  shifter #(.W(DATA_W)) u_shifter (
    .d        (a),
    .right    (sel0),
    .q        (shift_q),
    .shift_out(shift_out)
  );

  add_sub #(.W(DATA_W)) u_add_sub (
    .x       (a),
    .y       (b),
    .sub     (sel0),
    .s       (sum),
    .carry   (add_carry),
    .overflow(add_overflow)
  );

  bus_mux2 #(.W(DATA_W)) u_bus_mux (
    .in0(shift_q),
    .in1(sum),
    .sel(sel1),
    .out(result)
  );

  flag_calc #(.W(DATA_W)) u_flag_calc (
    .result  (result),
    .zero    (zero),
    .negative(negative)
  );

  always_comb begin
    flags.carry    = sel1 ? add_carry    : shift_out;
    flags.overflow = sel1 ? add_overflow : 1'b0;
    flags.negative = negative;
    flags.zero     = zero;
  end
endmodule
