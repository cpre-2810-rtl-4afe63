// pc_register: the i281 6-bit program counter register.
//
// A 6-bit parallel-access register: each bit is a D flip-flop behind a
// 2-to-1 multiplexer selected by write_enable (control line c3,
// PROGRAM_COUNTER_WRITE_EN), as in the document's figure. In this
// single-cycle CPU c3 is always 1, so the register takes a new address on
// every rising clock edge. A synchronous active-low reset loads
// RESET_VALUE; its default, binary 100000, is the start address the
// document's figures show in the PC, while the reset itself is this design's
// choice.
module pc_register
  import i281_pkg::*;
#(
  parameter pc_t RESET_VALUE = 6'b100000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic write_enable,
  input  pc_t  d,
  output pc_t  q
);
  always_ff @(posedge clk) begin
    if (!rst_n)            q <= RESET_VALUE;
    else if (write_enable) q <= d;
  end
endmodule
