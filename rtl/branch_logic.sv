// branch_logic: control line c2 (PROGRAM_COUNTER_MUX).
//
// c2 = JUMP + BRE*B1 + BRNE*B2 + BRG*B3 + BRGE*B4, where the opcode decode
// lines say which jump or branch is being executed and the conditions come
// from the flags register: B1 = ZF, B2 = NOT ZF, B3 = NOT ZF AND
// XNOR(NF, OF), B4 = XNOR(NF, OF). These are the document's signed
// comparisons after CMP X, Y (greater, greater or equal, equal, not equal).
// The carry flag is an input of the document's figure but is not used:
// unsigned comparisons are not supported. Combinational.
module branch_logic
  import i281_pkg::*;
(
  input  logic   jump,
  input  logic   bre,
  input  logic   brne,
  input  logic   brg,
  input  logic   brge,
  input  flags_t flags,
  output logic   c2
);
  logic b1, b2, b3, b4, nf_xnor_of;

  assign nf_xnor_of = ~(flags.negative ^ flags.overflow);
  assign b1 = flags.zero;
  assign b2 = ~flags.zero;
  assign b3 = ~flags.zero & nf_xnor_of;
  assign b4 = nf_xnor_of;

  assign c2 = (jump | (bre & b1)) | ((brne & b2) | (brg & b3) | (brge & b4));

  logic unused_carry;
  assign unused_carry = flags.carry;
endmodule
