// control_unit: instruction decoder of the single-cycle i281 CPU.
//
// Turns the 16-bit instruction into the eighteen control lines c1..c18 of
// the document's control table, one row per opcode. Register selects are
// the instruction's X field [11:10] or Y field [9:8] exactly where the
// table puts X1 X0 or Y1 Y0; blank cells are 0, which for the ALU select
// means shift left, so the ALU computes a shift whose result is ignored by
// every opcode that does not use it. c3 (PC write enable) is always 1
// because one instruction completes per clock. c2 comes from branch_logic
// using the current flags. Combinational.
module control_unit
  import i281_pkg::*;
(
  input  instr_t instr,
  input  flags_t flags,
  output ctrl_t  ctrl
);
  opcode_e    op;
  logic [1:0] fx, fy;
  logic       is_jump, is_bre, is_brne, is_brg, is_brge;
  logic       c2;

  assign op = opcode_e'(instr[15:12]);
  assign fx = instr[11:10];
  assign fy = instr[9:8];

  assign is_jump = (op == OP_JUMP);
  assign is_bre  = (op == OP_BRANCH) && (fy == SUB_BRE);
  assign is_brne = (op == OP_BRANCH) && (fy == SUB_BRNE);
  assign is_brg  = (op == OP_BRANCH) && (fy == SUB_BRG);
  assign is_brge = (op == OP_BRANCH) && (fy == SUB_BRGE);

  branch_logic u_branch (
    .jump (is_jump),
    .bre  (is_bre),
    .brne (is_brne),
    .brg  (is_brg),
    .brge (is_brge),
    .flags(flags),
    .c2   (c2)
  );

  always_comb begin
    ctrl = '0;
    ctrl.pc_write_enable = 1'b1;
    ctrl.pc_mux          = c2;
    unique case (op)
      OP_NOOP: ;
      OP_INPUT: begin
        unique case (fy)
          SUB_INPUTC: begin
            ctrl.imem_write_enable = 1'b1;
            ctrl.alu_result_mux    = 1'b1;
          end
          SUB_INPUTCF: begin
            ctrl.imem_write_enable = 1'b1;
            ctrl.reg_port0_select  = fx;
            ctrl.alu_source_mux    = 1'b1;
            ctrl.alu_select        = ALU_ADD;
          end
          SUB_INPUTD: begin
            ctrl.alu_result_mux    = 1'b1;
            ctrl.dmem_input_mux    = 1'b1;
            ctrl.dmem_write_enable = 1'b1;
          end
          SUB_INPUTDF: begin
            ctrl.reg_port0_select  = fx;
            ctrl.alu_source_mux    = 1'b1;
            ctrl.alu_select        = ALU_ADD;
            ctrl.dmem_input_mux    = 1'b1;
            ctrl.dmem_write_enable = 1'b1;
          end
        endcase
      end
      OP_MOVE: begin
        ctrl.reg_port0_select = fy;
        ctrl.reg_write_select = fx;
        ctrl.reg_write_enable = 1'b1;
        ctrl.alu_source_mux   = 1'b1;
        ctrl.alu_select       = ALU_ADD;
      end
      OP_LOADI: begin
        ctrl.reg_write_select = fx;
        ctrl.reg_write_enable = 1'b1;
        ctrl.alu_result_mux   = 1'b1;
      end
      OP_ADD, OP_SUB: begin
        ctrl.reg_port0_select   = fx;
        ctrl.reg_port1_select   = fy;
        ctrl.reg_write_select   = fx;
        ctrl.reg_write_enable   = 1'b1;
        ctrl.alu_select         = (op == OP_SUB) ? ALU_SUB : ALU_ADD;
        ctrl.flags_write_enable = 1'b1;
      end
      OP_ADDI, OP_SUBI: begin
        ctrl.reg_port0_select   = fx;
        ctrl.reg_write_select   = fx;
        ctrl.reg_write_enable   = 1'b1;
        ctrl.alu_source_mux     = 1'b1;
        ctrl.alu_select         = (op == OP_SUBI) ? ALU_SUB : ALU_ADD;
        ctrl.flags_write_enable = 1'b1;
      end
      OP_LOAD: begin
        ctrl.reg_write_select  = fx;
        ctrl.reg_write_enable  = 1'b1;
        ctrl.alu_result_mux    = 1'b1;
        ctrl.reg_writeback_mux = 1'b1;
      end
      OP_LOADF: begin
        ctrl.reg_port0_select  = fy;
        ctrl.reg_write_select  = fx;
        ctrl.reg_write_enable  = 1'b1;
        ctrl.alu_source_mux    = 1'b1;
        ctrl.alu_select        = ALU_ADD;
        ctrl.reg_writeback_mux = 1'b1;
      end
      OP_STORE: begin
        ctrl.reg_port1_select  = fx;
        ctrl.alu_result_mux    = 1'b1;
        ctrl.dmem_write_enable = 1'b1;
      end
      OP_STOREF: begin
        ctrl.reg_port0_select  = fy;
        ctrl.reg_port1_select  = fx;
        ctrl.alu_source_mux    = 1'b1;
        ctrl.alu_select        = ALU_ADD;
        ctrl.dmem_write_enable = 1'b1;
      end
      OP_SHIFT: begin
        ctrl.reg_port0_select   = fx;
        ctrl.reg_write_select   = fx;
        ctrl.reg_write_enable   = 1'b1;
        ctrl.alu_select         = instr[8] ? ALU_SHIFTR : ALU_SHIFTL;
        ctrl.flags_write_enable = 1'b1;
      end
      OP_CMP: begin
        ctrl.reg_port0_select   = fx;
        ctrl.reg_port1_select   = fy;
        ctrl.alu_select         = ALU_SUB;
        ctrl.flags_write_enable = 1'b1;
      end
      OP_JUMP, OP_BRANCH: ;
    endcase
  end

  // The low byte (immediate, address or offset) bypasses the decoder.
  logic unused_low_byte;
  assign unused_low_byte = ^instr[7:0];
endmodule
