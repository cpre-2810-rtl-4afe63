// i281_cpu: single-cycle 8-bit i281 processor.
//
// Every clock edge completes one instruction. The program counter addresses
// the code memory; the 16-bit word read there is decoded by the control unit
// into the control lines c1..c18. Register port 0 always feeds the ALU's
// first operand; the ALU source multiplexer (c11) gives the second operand
// from register port 1 or from the instruction's low byte. The ALU result
// multiplexer (c15) passes the ALU result or the low byte itself; its output
// is the value written back to a register (LOADI, ADD, MOVE, ...), the data
// memory address (LOAD, STORE, INPUTD and their offset forms) and the code
// memory write address (INPUTC, INPUTCF). The data memory input multiplexer
// (c16) writes register port 1 or the data switches; the register writeback
// multiplexer (c18) picks the ALU path or the data memory output. The flags
// register (c14) keeps the ALU's carry, overflow, negative and zero flags
// for the branches. The PC update logic forms PC+1 and PC+1+offset and c2
// picks one for the PC.
//
// The datapath and control follow the document's figures and control table.
// The switches the INPUT instructions read are brought out as code_switches
// and data_switches; the memory images loaded at reset and the debug outputs
// are this design's choices. Reset is synchronous and active low: the PC
// goes to PC_RESET, registers and flags to 0, and both memories to their
// images.
//
// Timing: all state changes on the rising edge of clk. The outputs show the
// state between edges: pc, the instruction being executed, the flags,
// registers A-D and the data memory.
module i281_cpu
  import i281_pkg::*;
#(
  parameter pc_t         PC_RESET  = 6'b100000,
  parameter code_image_t CODE_INIT = sum_1_to_5_code(),
  parameter data_image_t DATA_INIT = sum_1_to_5_data()
) (
  input  logic   clk,
  input  logic   rst_n,
  input  instr_t code_switches,
  input  data_t  data_switches,
  output pc_t    pc,
  output instr_t instr,
  output flags_t flags,
  output data_t  regs [NUM_REGS],
  output data_t  dmem [DMEM_DEPTH]
);
  ctrl_t  ctrl;
  flags_t alu_flags;
  data_t  imm;
  data_t  port0, port1;
  data_t  alu_b, alu_result, result_bus, dmem_wdata, dmem_rdata, reg_wdata;
  pc_t    pc_plus1, pc_target, pc_next;

  assign imm = instr[7:0];

  // Instruction fetch and program counter.
  code_memory #(.INIT(CODE_INIT)) u_code_memory (
    .clk         (clk),
    .rst_n       (rst_n),
    .raddr       (pc),
    .rdata       (instr),
    .write_enable(ctrl.imem_write_enable),
    .waddr       (result_bus[PC_W-1:0]),
    .wdata       (code_switches)
  );

  pc_update_logic u_pc_update (
    .pc       (pc),
    .offset   (imm[PC_W-1:0]),
    .pc_plus1 (pc_plus1),
    .pc_target(pc_target)
  );

  bus_mux2 #(.W(PC_W)) u_pc_mux (
    .in0(pc_plus1),
    .in1(pc_target),
    .sel(ctrl.pc_mux),
    .out(pc_next)
  );

  pc_register #(.RESET_VALUE(PC_RESET)) u_pc (
    .clk         (clk),
    .rst_n       (rst_n),
    .write_enable(ctrl.pc_write_enable),
    .d           (pc_next),
    .q           (pc)
  );

  // Decode.
  control_unit u_control (
    .instr(instr),
    .flags(flags),
    .ctrl (ctrl)
  );

  // Registers and ALU.
  register_file u_regs (
    .clk         (clk),
    .rst_n       (rst_n),
    .port0_select(ctrl.reg_port0_select),
    .port1_select(ctrl.reg_port1_select),
    .write_select(ctrl.reg_write_select),
    .write_enable(ctrl.reg_write_enable),
    .wdata       (reg_wdata),
    .port0       (port0),
    .port1       (port1),
    .regs        (regs)
  );

  bus_mux2 #(.W(DATA_W)) u_alu_source_mux (
    .in0(port1),
    .in1(imm),
    .sel(ctrl.alu_source_mux),
    .out(alu_b)
  );

  alu u_alu (
    .a     (port0),
    .b     (alu_b),
    .op    (ctrl.alu_select),
    .result(alu_result),
    .flags (alu_flags)
  );

  flags_register u_flags (
    .clk         (clk),
    .rst_n       (rst_n),
    .write_enable(ctrl.flags_write_enable),
    .d           (alu_flags),
    .q           (flags)
  );

  bus_mux2 #(.W(DATA_W)) u_alu_result_mux (
    .in0(alu_result),
    .in1(imm),
    .sel(ctrl.alu_result_mux),
    .out(result_bus)
  );

  // Data memory and write-back.
  bus_mux2 #(.W(DATA_W)) u_dmem_input_mux (
    .in0(port1),
    .in1(data_switches),
    .sel(ctrl.dmem_input_mux),
    .out(dmem_wdata)
  );

  data_memory #(.INIT(DATA_INIT)) u_data_memory (
    .clk         (clk),
    .rst_n       (rst_n),
    .addr        (result_bus),
    .rdata       (dmem_rdata),
    .write_enable(ctrl.dmem_write_enable),
    .wdata       (dmem_wdata),
    .mem_o       (dmem)
  );

  bus_mux2 #(.W(DATA_W)) u_writeback_mux (
    .in0(result_bus),
    .in1(dmem_rdata),
    .sel(ctrl.reg_writeback_mux),
    .out(reg_wdata)
  );

  // Single-cycle rules: the PC advances on every clock, and no instruction
  // both writes the flags and takes its value from the immediate bypass.
  a_pc_always_written: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.pc_write_enable);
  a_flags_need_alu: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.flags_write_enable |-> !ctrl.alu_result_mux);

  logic unused_result_hi;
  assign unused_result_hi = ^result_bus[DATA_W-1:PC_W];
endmodule
