// tb_flag_calc: exhaustive check of the zero and negative flags: zero when
// the byte equals 0, negative when it is above 127 (negative as a signed
// byte).
module tb_flag_calc;
  logic [7:0] result;
  logic       zero, negative;
  int checks = 0, failures = 0;

  flag_calc dut (.result(result), .zero(zero), .negative(negative));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      result = 8'(v);
      #1;
      checks++;
      if (zero !== (v == 0) || negative !== (v > 127)) begin
        failures++;
        $display("mismatch v=%0d z=%b n=%b", v, zero, negative);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
