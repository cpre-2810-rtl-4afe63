// pc_update_logic: next-address candidates for the i281 program counter.
//
// Two adders that can only add (carry-in tied to 0), as in the document:
// the first forms pc + 1, the route for every instruction that is not a
// taken jump or branch; the second adds the 6-bit offset (the low six bits
// of the instruction's second byte, two's complement) to pc + 1, the route
// for a taken jump or branch. Carries and overflows are dropped, so the
// address wraps around from 111111 to 000000. The PROGRAM_COUNTER_MUX (c2)
// outside this block chooses between the two. Combinational.
module pc_update_logic
  import i281_pkg::*;
(
  input  pc_t pc,
  input  pc_t offset,
  output pc_t pc_plus1,
  output pc_t pc_target
);
  logic unused_c0, unused_o0, unused_c1, unused_o1;

  add_sub #(.W(PC_W)) u_inc (
    .x       (pc),
    .y       (pc_t'(1)),
    .sub     (1'b0),
    .s       (pc_plus1),
    .carry   (unused_c0),
    .overflow(unused_o0)
  );

  add_sub #(.W(PC_W)) u_target (
    .x       (pc_plus1),
    .y       (offset),
    .sub     (1'b0),
    .s       (pc_target),
    .carry   (unused_c1),
    .overflow(unused_o1)
  );
endmodule
