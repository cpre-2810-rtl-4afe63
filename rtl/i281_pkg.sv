// i281_pkg: types and constants shared by the i281 CPU modules.
//
// The i281 is a single-cycle 8-bit processor with four registers (A-D), a
// 64-word x 16-bit code memory and a small byte-wide data memory. An
// instruction is 16 bits: [15:12] opcode, [11:10] first register X,
// [9:8] second register Y or a sub-opcode, [7:0] immediate, address or
// branch offset. The opcodes of MOVE, LOADI, ADD, ADDI, LOAD, STORE, CMP,
// JUMP and BRG and the BRG sub-opcode follow the machine code of the
// document's example program; the remaining opcodes fill the 16 slots in
// the order of the document's control table, and the sub-opcodes of the
// INPUT, SHIFT and branch groups are this design's choice.
//
// ctrl_t names the eighteen control lines c1..c18 of the control table.
// flags_t holds the four flags in the order of the flags register figure.
package i281_pkg;

  localparam int unsigned DATA_W     = 8;
  localparam int unsigned PC_W       = 6;
  localparam int unsigned INSTR_W    = 16;
  localparam int unsigned CODE_DEPTH = 64;
  localparam int unsigned NUM_REGS   = 4;
  // The data memory size is not given by the document; 16 bytes.
  localparam int unsigned DMEM_DEPTH = 16;

  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [PC_W-1:0]    pc_t;
  typedef logic [INSTR_W-1:0] instr_t;

  typedef enum logic [3:0] {
    OP_NOOP   = 4'b0000,
    OP_INPUT  = 4'b0001,  // INPUTC / INPUTCF / INPUTD / INPUTDF by [9:8]
    OP_MOVE   = 4'b0010,
    OP_LOADI  = 4'b0011,  // LOADI and LOADP share the encoding
    OP_ADD    = 4'b0100,
    OP_ADDI   = 4'b0101,
    OP_SUB    = 4'b0110,
    OP_SUBI   = 4'b0111,
    OP_LOAD   = 4'b1000,
    OP_LOADF  = 4'b1001,
    OP_STORE  = 4'b1010,
    OP_STOREF = 4'b1011,
    OP_SHIFT  = 4'b1100,  // SHIFTL / SHIFTR by [8]
    OP_CMP    = 4'b1101,
    OP_JUMP   = 4'b1110,
    OP_BRANCH = 4'b1111   // BRE / BRNE / BRG / BRGE by [9:8]
  } opcode_e;

  // Sub-opcodes in bits [9:8].
  localparam logic [1:0] SUB_INPUTC  = 2'b00;
  localparam logic [1:0] SUB_INPUTCF = 2'b01;
  localparam logic [1:0] SUB_INPUTD  = 2'b10;
  localparam logic [1:0] SUB_INPUTDF = 2'b11;
  localparam logic [1:0] SUB_BRE     = 2'b00;
  localparam logic [1:0] SUB_BRNE    = 2'b01;
  localparam logic [1:0] SUB_BRG     = 2'b10;
  localparam logic [1:0] SUB_BRGE    = 2'b11;

  // ALU_SELECT1, ALU_SELECT0 (c12, c13).
  typedef enum logic [1:0] {
    ALU_SHIFTL = 2'b00,
    ALU_SHIFTR = 2'b01,
    ALU_ADD    = 2'b10,
    ALU_SUB    = 2'b11
  } alu_op_e;

  typedef struct packed {
    logic carry;
    logic overflow;
    logic negative;
    logic zero;
  } flags_t;

  typedef struct packed {
    logic       imem_write_enable;      // c1
    logic       pc_mux;                 // c2
    logic       pc_write_enable;        // c3
    logic [1:0] reg_port0_select;       // c4 c5
    logic [1:0] reg_port1_select;       // c6 c7
    logic [1:0] reg_write_select;       // c8 c9
    logic       reg_write_enable;       // c10
    logic       alu_source_mux;         // c11
    alu_op_e    alu_select;             // c12 c13
    logic       flags_write_enable;     // c14
    logic       alu_result_mux;         // c15
    logic       dmem_input_mux;         // c16
    logic       dmem_write_enable;      // c17
    logic       reg_writeback_mux;      // c18
  } ctrl_t;

  typedef instr_t code_image_t [CODE_DEPTH];
  typedef data_t  data_image_t [DMEM_DEPTH];

  // The document's example: add the numbers from 1 to 5. The program sits at
  // code addresses 32..40 (binary 100000..101000), where the program counter
  // starts; every other word is NOOP.
  function automatic code_image_t sum_1_to_5_code();
    code_image_t img;
    for (int i = 0; i < CODE_DEPTH; i++) img[i] = '0;
    img[32] = 16'b0011_01_00_00000000;  // LOADI B, 0
    img[33] = 16'b0011_00_00_00000001;  // LOADI A, 1
    img[34] = 16'b1000_11_00_00000000;  // LOAD  D, [N]
    img[35] = 16'b1101_00_11_00000000;  // CMP   A, D
    img[36] = 16'b1111_00_10_00000011;  // BRG   End
    img[37] = 16'b0100_01_00_00000000;  // ADD   B, A
    img[38] = 16'b0101_00_00_00000001;  // ADDI  A, 1
    img[39] = 16'b1110_00_00_11111011;  // JUMP  Loop
    img[40] = 16'b1010_01_00_00000010;  // STORE [sum], B
    return img;
  endfunction

  // Data of the same example: N = 5 at address 0, i and sum at 1 and 2.
  function automatic data_image_t sum_1_to_5_data();
    data_image_t img;
    for (int i = 0; i < DMEM_DEPTH; i++) img[i] = '0;
    img[0] = 8'd5;
    return img;
  endfunction

endpackage
