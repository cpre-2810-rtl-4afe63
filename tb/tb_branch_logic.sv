// tb_branch_logic: checks c2 two ways. (1) For random signed operand pairs
// the flags a CMP X, Y would produce are formed by integer arithmetic and c2
// must follow the signed comparison of X and Y for BRE, BRNE, BRG and BRGE,
// and always be 1 for JUMP and 0 with no jump/branch line. (2) All 16 flag
// values with every decode line, against the B1..B4 equations.
module tb_branch_logic;
  import i281_pkg::*;
  logic   jump, bre, brne, brg, brge, c2;
  flags_t flags;
  int checks = 0, failures = 0;
  int taken = 0, not_taken = 0;

  branch_logic dut (.jump(jump), .bre(bre), .brne(brne), .brg(brg), .brge(brge),
                    .flags(flags), .c2(c2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(input int sel, input flags_t f, input logic exp);
    {jump, bre, brne, brg, brge} = '0;
    case (sel)
      0: jump = 1;
      1: bre  = 1;
      2: brne = 1;
      3: brg  = 1;
      4: brge = 1;
      default: ;
    endcase
    flags = f;
    #1;
    checks++;
    if (exp) taken++; else not_taken++;
    if (c2 !== exp) begin
      failures++;
      $display("mismatch sel=%0d flags=%b c2=%b exp=%b", sel, f, c2, exp);
    end
  endtask

  initial begin
    int x, y, d;
    flags_t f;
    logic [7:0] r;
    for (int n = 0; n < 3000; n++) begin
      x = int'($urandom % 256) - 128;
      y = (n % 5 == 0) ? x : int'($urandom % 256) - 128;
      d = x - y;
      r = 8'(d);
      f.zero     = (r == 0);
      f.negative = r[7];
      f.overflow = (d > 127) || (d < -128);
      f.carry    = (x + 256) % 256 >= (y + 256) % 256;
      drive(0, f, 1'b1);
      drive(1, f, x == y);
      drive(2, f, x != y);
      drive(3, f, x > y);
      drive(4, f, x >= y);
      drive(5, f, 1'b0);
    end
    for (int v = 0; v < 16; v++) begin
      f = flags_t'(v);
      drive(1, f, f.zero);
      drive(2, f, !f.zero);
      drive(3, f, !f.zero && (f.negative == f.overflow));
      drive(4, f, f.negative == f.overflow);
    end
    if (taken == 0 || not_taken == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
