// tb_control_unit: checks the decoder against the control table. Each row
// of the table is typed in below as the list of columns C1..C18 that hold a
// 1 and the fields (X or Y) copied into the three register selects; the
// packed ctrl_t is exactly C1..C18 from its top bit down. Every row is
// decoded with random register fields, immediates and flags; c2 of the
// branch rows must follow B1..B4 computed from the flags.
module tb_control_unit;
  import i281_pkg::*;
  instr_t instr;
  flags_t flags;
  ctrl_t  ctrl;
  int checks = 0, failures = 0;
  int rows_seen [23];

  control_unit dut (.instr(instr), .flags(flags), .ctrl(ctrl));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control word from a table row.
  function automatic logic [17:0] row_word(input int ones[$], input string p0, input string p1,
                                           input string w, input logic [1:0] fx,
                                           input logic [1:0] fy);
    logic [17:0] v = '0;
    foreach (ones[k]) v[18 - ones[k]] = 1'b1;
    if (p0 == "X") v[18-4 -: 2] = fx; else if (p0 == "Y") v[18-4 -: 2] = fy;
    if (p1 == "X") v[18-6 -: 2] = fx; else if (p1 == "Y") v[18-6 -: 2] = fy;
    if (w  == "X") v[18-8 -: 2] = fx;
    return v;
  endfunction

  task automatic check_row(input int row, input logic [3:0] opc, input logic [1:0] sub,
                           input logic use_sub, input int ones[$], input string p0,
                           input string p1, input string w, input logic expect_c2);
    logic [1:0] fx, fy;
    logic [17:0] exp;
    fx = 2'($urandom);
    fy = use_sub ? sub : 2'($urandom);
    instr = {opc, fx, fy, 8'($urandom)};
    if (opc == 4'b1100) instr[8] = sub[0];
    #1;
    exp = row_word(ones, p0, p1, w, fx, instr[9:8]);
    exp[18-2] = expect_c2;
    checks++;
    rows_seen[row]++;
    if (ctrl !== ctrl_t'(exp)) begin
      failures++;
      $display("row %0d instr=%b got=%b exp=%b", row, instr, ctrl, exp);
    end
  endtask

  initial begin
    logic b1, b2, b3, b4;
    for (int n = 0; n < 200; n++) begin
      flags = flags_t'($urandom);
      b1 = flags.zero;
      b2 = !flags.zero;
      b3 = !flags.zero && (flags.negative == flags.overflow);
      b4 = flags.negative == flags.overflow;
      check_row( 0, 4'b0000, 2'b00, 0, '{3},                   "-", "-", "-", 0);  // NOOP
      check_row( 1, 4'b0001, 2'b00, 1, '{1, 3, 15},            "-", "-", "-", 0);  // INPUTC
      check_row( 2, 4'b0001, 2'b01, 1, '{1, 3, 11, 12},        "X", "-", "-", 0);  // INPUTCF
      check_row( 3, 4'b0001, 2'b10, 1, '{3, 15, 16, 17},       "-", "-", "-", 0);  // INPUTD
      check_row( 4, 4'b0001, 2'b11, 1, '{3, 11, 12, 16, 17},   "X", "-", "-", 0);  // INPUTDF
      check_row( 5, 4'b0010, 2'b00, 0, '{3, 10, 11, 12},       "Y", "-", "X", 0);  // MOVE
      check_row( 6, 4'b0011, 2'b00, 0, '{3, 10, 15},           "-", "-", "X", 0);  // LOADI
      check_row( 7, 4'b0100, 2'b00, 0, '{3, 10, 12, 14},       "X", "Y", "X", 0);  // ADD
      check_row( 8, 4'b0101, 2'b00, 0, '{3, 10, 11, 12, 14},   "X", "-", "X", 0);  // ADDI
      check_row( 9, 4'b0110, 2'b00, 0, '{3, 10, 12, 13, 14},   "X", "Y", "X", 0);  // SUB
      check_row(10, 4'b0111, 2'b00, 0, '{3, 10, 11, 12, 13, 14}, "X", "-", "X", 0); // SUBI
      check_row(11, 4'b1000, 2'b00, 0, '{3, 10, 15, 18},       "-", "-", "X", 0);  // LOAD
      check_row(12, 4'b1001, 2'b00, 0, '{3, 10, 11, 12, 18},   "Y", "-", "X", 0);  // LOADF
      check_row(13, 4'b1010, 2'b00, 0, '{3, 15, 17},           "-", "X", "-", 0);  // STORE
      check_row(14, 4'b1011, 2'b00, 0, '{3, 11, 12, 17},       "Y", "X", "-", 0);  // STOREF
      check_row(15, 4'b1100, 2'b00, 0, '{3, 10, 14},           "X", "-", "X", 0);  // SHIFTL
      check_row(16, 4'b1100, 2'b01, 0, '{3, 10, 13, 14},       "X", "-", "X", 0);  // SHIFTR
      check_row(17, 4'b1101, 2'b00, 0, '{3, 12, 13, 14},       "X", "Y", "-", 0);  // CMP
      check_row(18, 4'b1110, 2'b00, 0, '{3},                   "-", "-", "-", 1);  // JUMP
      check_row(19, 4'b1111, 2'b00, 1, '{3},                   "-", "-", "-", b1); // BRE
      check_row(20, 4'b1111, 2'b01, 1, '{3},                   "-", "-", "-", b2); // BRNE
      check_row(21, 4'b1111, 2'b10, 1, '{3},                   "-", "-", "-", b3); // BRG
      check_row(22, 4'b1111, 2'b11, 1, '{3},                   "-", "-", "-", b4); // BRGE
    end
    foreach (rows_seen[r]) if (rows_seen[r] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
