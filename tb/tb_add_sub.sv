// tb_add_sub: exhaustive check of the 8-bit adder/subtractor. Every pair
// (x, y) is added and subtracted; sum, carry (unsigned carry out, i.e. "no
// borrow" for subtraction) and overflow (signed result out of -128..127) are
// compared with integer arithmetic.
module tb_add_sub;
  logic [7:0] x, y, s;
  logic       sub, carry, overflow;
  int checks = 0, failures = 0;

  add_sub dut (.x(x), .y(y), .sub(sub), .s(s), .carry(carry), .overflow(overflow));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sx, sy, sres, ures;
    logic [7:0] exp_s;
    logic exp_c, exp_o;
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          x = 8'(i); y = 8'(j); sub = m[0];
          #1;
          sx = (i > 127) ? i - 256 : i;
          sy = (j > 127) ? j - 256 : j;
          if (m == 0) begin
            ures = i + j;  sres = sx + sy;
            exp_c = (ures > 255);
          end else begin
            ures = i - j;  sres = sx - sy;
            exp_c = (i >= j);
          end
          exp_s = 8'(ures);
          exp_o = (sres > 127) || (sres < -128);
          checks++;
          if (s !== exp_s || carry !== exp_c || overflow !== exp_o) begin
            failures++;
            if (failures < 10)
              $display("mismatch sub=%0d x=%0d y=%0d s=%h/%h c=%b/%b o=%b/%b",
                       m, i, j, s, exp_s, carry, exp_c, overflow, exp_o);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
