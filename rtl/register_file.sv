// register_file: the four 8-bit general registers A, B, C, D of the i281.
//
// Two combinational read ports, selected by REGISTERS_PORT0_SELECT (c4 c5)
// and REGISTERS_PORT1_SELECT (c6 c7), and one write port: on the rising
// clock edge, when write_enable (c10) is 1, the register chosen by
// REGISTERS_WRITE_SELECT (c8 c9) takes wdata. A = 00, B = 01, C = 10,
// D = 11. A value written is seen on the read ports after that edge. The
// document names the control lines only; the internal structure and the
// synchronous active-low reset to zero are this design's choices.
module register_file
  import i281_pkg::*;
#(
  parameter int unsigned N = NUM_REGS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] port0_select,
  input  logic [$clog2(N)-1:0] port1_select,
  input  logic [$clog2(N)-1:0] write_select,
  input  logic                 write_enable,
  input  data_t                wdata,
  output data_t                port0,
  output data_t                port1,
  output data_t                regs [N]
);
  data_t r [N];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) r[i] <= '0;
    end else if (write_enable) begin
      r[write_select] <= wdata;
    end
  end

  assign port0 = r[port0_select];
  assign port1 = r[port1_select];
  assign regs  = r;
endmodule
