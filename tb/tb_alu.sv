// tb_alu: exhaustive check of the ALU over all operand pairs and the four
// operations (00 shift left, 01 shift right, 10 add, 11 subtract). Expected
// result and flags are computed with integer arithmetic: carry is the
// shifted-out bit for shifts, the unsigned carry (no-borrow) for add and
// subtract; overflow is signed overflow for add/subtract and 0 for shifts.
module tb_alu;
  import i281_pkg::*;
  data_t   a, b, result;
  alu_op_e op;
  flags_t  flags;
  int checks = 0, failures = 0;
  int count_op [4];

  alu dut (.a(a), .b(b), .op(op), .result(result), .flags(flags));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, sr;
    data_t  er;
    flags_t ef;
    for (int o = 0; o < 4; o++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); op = alu_op_e'(o);
          #1;
          sa = (i > 127) ? i - 256 : i;
          sb = (j > 127) ? j - 256 : j;
          case (o)
            0: begin er = 8'((i * 2) % 256); ef.carry = i >= 128;   ef.overflow = 0; end
            1: begin er = 8'(i / 2);         ef.carry = (i % 2) == 1; ef.overflow = 0; end
            2: begin er = 8'(i + j); ef.carry = (i + j) > 255; sr = sa + sb;
                     ef.overflow = (sr > 127) || (sr < -128); end
            default: begin er = 8'(i - j); ef.carry = i >= j; sr = sa - sb;
                     ef.overflow = (sr > 127) || (sr < -128); end
          endcase
          ef.zero = (er == 0);
          ef.negative = er[7];
          checks++;
          count_op[o]++;
          if (result !== er || flags !== ef) begin
            failures++;
            if (failures < 10)
              $display("mismatch op=%0d a=%0d b=%0d r=%h/%h f=%b/%b", o, i, j, result, er, flags, ef);
          end
        end
    for (int o = 0; o < 4; o++)
      if (count_op[o] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
