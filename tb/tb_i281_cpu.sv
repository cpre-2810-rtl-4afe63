// tb_i281_cpu: end-to-end test of the i281 CPU against an instruction-set
// reference model.
//
// Several CPUs run side by side, each with its own code image: a directed
// program that uses every opcode, takes and skips every branch, writes code
// with INPUTC/INPUTCF and then executes it, and wraps the PC from 111111 to
// 000000; plus pseudo-random code images (every word random, generated by
// an xorshift at elaboration). Next to each CPU a model written from the
// instruction descriptions (not from the datapath) steps once per clock,
// and after every clock the PC, flags, registers and data memory of the CPU
// must equal the model's: one instruction per clock, as in a single-cycle
// machine. Each mechanism (every table row, branch taken and not taken,
// flag write and hold, PC wrap, shift carry, add/subtract overflow,
// executing code written by INPUTC) is counted and must happen at least
// once.
module tb_i281_cpu;
  import i281_pkg::*;

  localparam int NPROG  = 5;
  localparam int NCYCLE = 600;

  // Assembler helpers.
  function automatic instr_t ins(input logic [3:0] op, input logic [1:0] x,
                                 input logic [1:0] y, input logic [7:0] imm);
    return {op, x, y, imm};
  endfunction

  localparam logic [1:0] RA = 2'd0, RB = 2'd1, RC = 2'd2, RD = 2'd3;

  function automatic code_image_t directed_prog();
    code_image_t p;
    for (int i = 0; i < CODE_DEPTH; i++) p[i] = '0;
    p[0]  = ins(4'b1101, RA, RB, 8'd0);            // CMP   A, B
    p[1]  = ins(4'b0110, RB, RA, 8'd0);            // SUB   B, A
    p[2]  = ins(4'b1111, 2'd0, 2'b01, 8'd29);      // BRNE  -> 32
    p[32] = ins(4'b0011, RA, 2'd0, 8'd3);          // LOADI A, 3
    p[33] = ins(4'b0011, RB, 2'd0, 8'h80);         // LOADI B, -128
    p[34] = ins(4'b0010, RC, RA, 8'd0);            // MOVE  C, A
    p[35] = ins(4'b0100, RC, RB, 8'd0);            // ADD   C, B
    p[36] = ins(4'b0111, RB, 2'd0, 8'd1);          // SUBI  B, 1   (overflow)
    p[37] = ins(4'b1100, RB, 2'b00, 8'd0);         // SHIFTL B
    p[38] = ins(4'b1100, RC, 2'b01, 8'd0);         // SHIFTR C     (carry)
    p[39] = ins(4'b1010, RC, 2'd0, 8'd3);          // STORE [3], C
    p[40] = ins(4'b1001, RD, RA, 8'd0);            // LOADF D, [A+0]
    p[41] = ins(4'b1011, RD, RA, 8'd1);            // STOREF [A+1], D
    p[42] = ins(4'b0001, 2'd0, 2'b10, 8'd5);       // INPUTD [5]
    p[43] = ins(4'b0001, RA, 2'b11, 8'd3);         // INPUTDF [A+3]
    p[44] = ins(4'b0001, 2'd0, 2'b00, 8'd50);      // INPUTC [50]
    p[45] = ins(4'b0001, RA, 2'b01, 8'd48);        // INPUTCF [A+48]
    p[46] = ins(4'b1101, RA, RD, 8'd0);            // CMP   A, D   (less)
    p[47] = ins(4'b1111, 2'd0, 2'b10, 8'd10);      // BRG   (not taken)
    p[48] = ins(4'b1111, 2'd0, 2'b11, 8'd10);      // BRGE  (not taken)
    p[49] = ins(4'b1111, 2'd0, 2'b00, 8'd10);      // BRE   (not taken)
    p[50] = ins(4'b0000, 2'd0, 2'd0, 8'd0);        // replaced by INPUTC
    p[51] = ins(4'b0000, 2'd0, 2'd0, 8'd0);        // replaced by INPUTCF
    p[52] = ins(4'b1101, RD, RA, 8'd0);            // CMP   D, A   (greater)
    p[53] = ins(4'b1111, 2'd0, 2'b10, 8'd1);       // BRG   +1 (taken)
    p[54] = ins(4'b0011, RA, 2'd0, 8'hEE);         // skipped
    p[55] = ins(4'b1111, 2'd0, 2'b11, 8'd1);       // BRGE  +1 (taken)
    p[56] = ins(4'b0011, RA, 2'd0, 8'hEE);         // skipped
    p[57] = ins(4'b1101, RA, RA, 8'd0);            // CMP   A, A   (equal)
    p[58] = ins(4'b1111, 2'd0, 2'b00, 8'd1);       // BRE   +1 (taken)
    p[59] = ins(4'b0011, RA, 2'd0, 8'hEE);         // skipped
    p[60] = ins(4'b1111, 2'd0, 2'b01, 8'd1);       // BRNE  (not taken)
    p[61] = ins(4'b1110, 2'd0, 2'd0, 8'd0);        // JUMP  +0
    p[62] = ins(4'b0101, RB, 2'd0, 8'd7);          // ADDI  B, 7
    p[63] = ins(4'b0000, 2'd0, 2'd0, 8'd0);        // NOOP, then wrap to 0
    return p;
  endfunction

  function automatic code_image_t random_prog(input int unsigned seed);
    code_image_t p;
    int unsigned s;
    s = seed * 32'h9E3779B9 + 32'h1234567;
    for (int i = 0; i < CODE_DEPTH; i++) begin
      s = s ^ (s << 13);
      s = s ^ (s >> 17);
      s = s ^ (s << 5);
      p[i] = instr_t'(s >> 7);
    end
    return p;
  endfunction

  function automatic data_image_t random_data(input int unsigned seed);
    data_image_t d;
    for (int i = 0; i < DMEM_DEPTH; i++) d[i] = data_t'((seed + 1) * 37 + i * 91);
    return d;
  endfunction

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int row_count [23];
  int br_taken [4], br_skipped [4];
  int flag_writes = 0, flag_holds = 0, pc_wraps = 0, shift_carries = 0;
  int overflows = 0, exec_written_code = 0;

  initial begin
    repeat (NCYCLE + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NPROG; g++) begin : g_prog
    localparam code_image_t CODE = (g == 0) ? directed_prog() : random_prog(g);
    localparam data_image_t DATA = (g == 0) ? sum_1_to_5_data() : random_data(g);

    instr_t code_sw;
    data_t  data_sw;
    pc_t    pc;
    instr_t instr;
    flags_t flags;
    data_t  regs [NUM_REGS];
    data_t  dmem [DMEM_DEPTH];

    i281_cpu #(.CODE_INIT(CODE), .DATA_INIT(DATA)) dut (
      .clk(clk), .rst_n(rst_n), .code_switches(code_sw), .data_switches(data_sw),
      .pc(pc), .instr(instr), .flags(flags), .regs(regs), .dmem(dmem));

    // Reference model state.
    instr_t m_code [CODE_DEPTH];
    logic   m_written [CODE_DEPTH];
    data_t  m_dmem [DMEM_DEPTH];
    data_t  m_r [NUM_REGS];
    pc_t    m_pc;
    flags_t m_f;

    function automatic flags_t arith_flags(input int ua, input int ub, input bit sub);
      flags_t f;
      int sa, sb, sr, ur;
      sa = (ua > 127) ? ua - 256 : ua;
      sb = (ub > 127) ? ub - 256 : ub;
      if (sub) begin ur = ua - ub; sr = sa - sb; f.carry = ua >= ub; end
      else     begin ur = ua + ub; sr = sa + sb; f.carry = ur > 255; end
      f.overflow = (sr > 127) || (sr < -128);
      f.zero     = ((ur % 256 + 256) % 256) == 0;
      f.negative = ((ur % 256 + 256) % 256) > 127;
      return f;
    endfunction

    task automatic model_reset();
      for (int i = 0; i < CODE_DEPTH; i++) begin m_code[i] = CODE[i]; m_written[i] = 0; end
      for (int i = 0; i < DMEM_DEPTH; i++) m_dmem[i] = DATA[i];
      for (int i = 0; i < NUM_REGS; i++) m_r[i] = '0;
      m_pc = 6'd32;
      m_f  = '0;
    endtask

    // One instruction, from the instruction-set descriptions.
    task automatic model_step();
      instr_t w;
      int op, x, y, imm, off, nxt, a, b, t;
      bit taken, flag_wr;
      w   = m_code[m_pc];
      op  = int'(w[15:12]); x = int'(w[11:10]); y = int'(w[9:8]); imm = int'(w[7:0]);
      off = (imm % 64 > 31) ? imm % 64 - 64 : imm % 64;
      nxt = (int'(m_pc) + 1) % 64;
      taken = 0; flag_wr = 0;
      if (m_written[m_pc]) exec_written_code++;
      case (op)
        0: row_count[0]++;
        1: case (y)
             0: begin row_count[1]++; m_code[imm % 64] = code_sw; m_written[imm % 64] = 1; end
             1: begin row_count[2]++; t = (int'(m_r[x]) + imm) % 64;
                      m_code[t] = code_sw; m_written[t] = 1; end
             2: begin row_count[3]++; m_dmem[imm % 16] = data_sw; end
             default: begin row_count[4]++; m_dmem[(int'(m_r[x]) + imm) % 16] = data_sw; end
           endcase
        2: begin row_count[5]++; m_r[x] = data_t'(int'(m_r[y]) + imm); end
        3: begin row_count[6]++; m_r[x] = data_t'(imm); end
        4, 5, 6, 7: begin
          a = int'(m_r[x]);
          b = (op == 4 || op == 6) ? int'(m_r[y]) : imm;
          row_count[op + 3]++;
          m_f = arith_flags(a, b, op >= 6); flag_wr = 1;
          if (m_f.overflow) overflows++;
          m_r[x] = data_t'((op >= 6) ? a - b : a + b);
        end
        8: begin row_count[11]++; m_r[x] = m_dmem[imm % 16]; end
        9: begin row_count[12]++; m_r[x] = m_dmem[(int'(m_r[y]) + imm) % 16]; end
        10: begin row_count[13]++; m_dmem[imm % 16] = m_r[x]; end
        11: begin row_count[14]++; m_dmem[(int'(m_r[y]) + imm) % 16] = m_r[x]; end
        12: begin
          a = int'(m_r[x]);
          if (y % 2 == 0) begin row_count[15]++; t = (a * 2) % 256; m_f.carry = a > 127; end
          else            begin row_count[16]++; t = a / 2;         m_f.carry = a % 2 == 1; end
          m_f.overflow = 0; m_f.zero = (t == 0); m_f.negative = t > 127; flag_wr = 1;
          if (m_f.carry) shift_carries++;
          m_r[x] = data_t'(t);
        end
        13: begin
          row_count[17]++;
          m_f = arith_flags(int'(m_r[x]), int'(m_r[y]), 1); flag_wr = 1;
          if (m_f.overflow) overflows++;
        end
        14: begin row_count[18]++; taken = 1; end
        default: begin
          // After CMP X, Y the flags encode the signed comparison of X and Y.
          case (y)
            0: taken = m_f.zero;
            1: taken = !m_f.zero;
            2: taken = !m_f.zero && (m_f.negative == m_f.overflow);
            default: taken = (m_f.negative == m_f.overflow);
          endcase
          row_count[19 + y]++;
          if (taken) br_taken[y]++; else br_skipped[y]++;
        end
      endcase
      if (flag_wr) flag_writes++; else flag_holds++;
      if (taken) nxt = ((nxt + off) % 64 + 64) % 64;
      if (m_pc == 6'd63 && nxt == 0) pc_wraps++;
      m_pc = pc_t'(nxt);
    endtask

    initial begin
      code_sw = ins(4'b0101, RA, 2'd0, 8'd1);  // ADDI A, 1 for the directed program
      data_sw = 8'h5A;
      model_reset();
      wait (rst_n);
      forever begin
        @(posedge clk);
        model_step();
        @(negedge clk);
        checks++;
        if (pc !== m_pc || flags !== m_f) begin
          failures++;
          if (failures < 20) $display("prog %0d: pc=%0d/%0d flags=%b/%b", g, pc, m_pc, flags, m_f);
        end
        for (int i = 0; i < NUM_REGS; i++) begin
          checks++;
          if (regs[i] !== m_r[i]) begin
            failures++;
            if (failures < 20) $display("prog %0d: reg %0d = %h/%h", g, i, regs[i], m_r[i]);
          end
        end
        for (int i = 0; i < DMEM_DEPTH; i++) begin
          checks++;
          if (dmem[i] !== m_dmem[i]) begin
            failures++;
            if (failures < 20) $display("prog %0d: dmem %0d = %h/%h", g, i, dmem[i], m_dmem[i]);
          end
        end
        if (g != 0) begin
          code_sw = instr_t'($urandom);
          data_sw = data_t'($urandom);
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    repeat (NCYCLE) @(posedge clk);
    @(negedge clk);
    for (int r = 0; r < 23; r++)
      if (row_count[r] == 0) begin failures++; $display("table row %0d never executed", r); end
    for (int b = 0; b < 4; b++) begin
      if (br_taken[b] == 0)   begin failures++; $display("branch %0d never taken", b); end
      if (br_skipped[b] == 0) begin failures++; $display("branch %0d never skipped", b); end
    end
    if (flag_writes == 0 || flag_holds == 0) begin failures++; $display("flags never written or held"); end
    if (pc_wraps == 0)          begin failures++; $display("PC never wrapped"); end
    if (shift_carries == 0)     begin failures++; $display("no shift carry"); end
    if (overflows == 0)         begin failures++; $display("no overflow"); end
    if (exec_written_code == 0) begin failures++; $display("INPUTC code never executed"); end
    $display("mechanisms: flag writes %0d holds %0d, PC wraps %0d, shift carries %0d, overflows %0d, INPUTC code run %0d",
             flag_writes, flag_holds, pc_wraps, shift_carries, overflows, exec_written_code);
    for (int b = 0; b < 4; b++)
      $display("branch %0d taken %0d skipped %0d", b, br_taken[b], br_skipped[b]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
