// tb_pc_update_logic: exhaustive over all 64 addresses and 64 offsets.
// pc_plus1 must be (pc + 1) mod 64 and pc_target (pc + 1 + offset) mod 64
// with the offset read as a signed 6-bit number. Also checks the examples
// of the sum program (BRG at 100100 with offset 3 reaches 101000, JUMP at
// 100111 with offset -5 reaches 100011), the wrap from 111111 to 000000, and
// every entry of the offset table with its +1 correction.
module tb_pc_update_logic;
  import i281_pkg::*;
  pc_t pc, offset, pc_plus1, pc_target;
  int checks = 0, failures = 0;

  pc_update_logic dut (.pc(pc), .offset(offset), .pc_plus1(pc_plus1), .pc_target(pc_target));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int p, input int off, input int e1, input int et);
    pc = pc_t'(p); offset = pc_t'(off);
    #1;
    checks++;
    if (pc_plus1 !== pc_t'(e1) || pc_target !== pc_t'(et)) begin
      failures++;
      $display("mismatch pc=%0d off=%0d plus1=%0d/%0d target=%0d/%0d",
               p, off, pc_plus1, e1, pc_target, et);
    end
  endtask

  initial begin
    int soff;
    for (int p = 0; p < 64; p++)
      for (int o = 0; o < 64; o++) begin
        soff = (o > 31) ? o - 64 : o;
        check(p, o, (p + 1) % 64, (p + 1 + soff + 128) % 64);
      end
    check(6'b100100, 3, 6'b100101, 6'b101000);
    check(6'b100111, 8'b11111011 & 63, 6'b101000, 6'b100011);
    check(6'b111111, 0, 0, 0);
    // Offset encodings for a jump of d places from the branch itself: the
    // encoded byte is d - 1 (d = 0 is 11111111, d = 32 is 00011111,
    // d = -31 is 11100000); only its low six bits reach the adder.
    for (int d = -31; d <= 32; d++)
      check(6'b100000, int'(8'(d - 1)) % 64, 6'b100001, (32 + d + 64) % 64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
