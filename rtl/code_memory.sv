// code_memory: the i281 code (instruction) memory, 64 words of 16 bits.
//
// The word at the program counter's address is read combinationally, so the
// single-cycle CPU decodes and executes it in the same clock. When
// write_enable (c1, IMEM_WRITE_ENABLE) is 1, the word at waddr takes wdata
// on the rising clock edge; INPUTC and INPUTCF use this to load code from
// the input switches. The document gives the size (6-bit addresses,
// 16-bit words) and the write control. How the memory is first filled is
// this design's choice: a synchronous active-low reset loads the INIT image,
// whose default in the CPU is the document's example program.
module code_memory
  import i281_pkg::*;
#(
  parameter code_image_t INIT = '{default: '0}
) (
  input  logic   clk,
  input  logic   rst_n,
  input  pc_t    raddr,
  output instr_t rdata,
  input  logic   write_enable,
  input  pc_t    waddr,
  input  instr_t wdata
);
  instr_t mem [CODE_DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < CODE_DEPTH; i++) mem[i] <= INIT[i];
    end else if (write_enable) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];
endmodule
