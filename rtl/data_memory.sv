// data_memory: the i281 byte-wide data memory.
//
// DMEM_DEPTH bytes (16 by default) addressed by the low bits of an 8-bit
// address; the upper address bits are ignored, so addresses wrap. Reads are
// combinational (LOAD and LOADF complete in one clock); when write_enable
// (c17, DMEM_WRITE_ENABLE) is 1, the addressed byte takes wdata on the
// rising clock edge (STORE, STOREF, INPUTD, INPUTDF). The document gives the
// byte width and the write control; the size, the address wrap and the
// synchronous active-low reset that loads the INIT image are this design's
// choices.
module data_memory
  import i281_pkg::*;
#(
  parameter data_image_t INIT = '{default: '0}
) (
  input  logic  clk,
  input  logic  rst_n,
  input  data_t addr,
  output data_t rdata,
  input  logic  write_enable,
  input  data_t wdata,
  output data_t mem_o [DMEM_DEPTH]
);
  localparam int unsigned AW = $clog2(DMEM_DEPTH);

  data_t          mem [DMEM_DEPTH];
  logic [AW-1:0]  a;

  assign a = addr[AW-1:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < DMEM_DEPTH; i++) mem[i] <= INIT[i];
    end else if (write_enable) begin
      mem[a] <= wdata;
    end
  end

  assign rdata = mem[a];
  assign mem_o = mem;

  logic unused_addr_hi;
  assign unused_addr_hi = ^addr[DATA_W-1:AW];
endmodule
