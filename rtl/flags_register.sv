// flags_register: the i281 flags register (carry, overflow, negative, zero).
//
// A 4-bit parallel-access register: each bit is a D flip-flop behind a
// 2-to-1 multiplexer that feeds back the stored value when write_enable
// (control line c14, FLAGS_WRITE_ENABLE) is 0 and takes the new ALU flag
// when it is 1, as in the document's figure. The new value appears on q
// after the rising clock edge. The synchronous active-low reset to all zeros
// is this design's choice; the document gives no reset.
module flags_register
  import i281_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   write_enable,
  input  flags_t d,
  output flags_t q
);
  always_ff @(posedge clk) begin
    if (!rst_n)            q <= '0;
    else if (write_enable) q <= d;
  end
endmodule
