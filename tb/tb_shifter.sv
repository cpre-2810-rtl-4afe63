// tb_shifter: exhaustive check of the 8-bit shifter. Left: value * 2 mod 256
// with the old bit 7 on shift_out. Right: value / 2 with the old bit 0 on
// shift_out.
module tb_shifter;
  logic [7:0] d, q;
  logic       right, shift_out;
  int checks = 0, failures = 0;

  shifter dut (.d(d), .right(right), .q(q), .shift_out(shift_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] eq;
    logic eo;
    for (int r = 0; r < 2; r++)
      for (int v = 0; v < 256; v++) begin
        d = 8'(v); right = r[0];
        #1;
        if (r == 0) begin eq = 8'((v * 2) % 256); eo = (v >= 128); end
        else        begin eq = 8'(v / 2);         eo = (v % 2) == 1; end
        checks++;
        if (q !== eq || shift_out !== eo) begin
          failures++;
          $display("mismatch right=%0d d=%h q=%h/%h out=%b/%b", r, d, q, eq, shift_out, eo);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
