// tb_bus_mux2: checks the 8-bit 2-to-1 bus multiplexer on random inputs,
// both select values, against out = sel ? in1 : in0.
module tb_bus_mux2;
  logic [7:0] in0, in1, out;
  logic       sel;
  int checks = 0, failures = 0;

  bus_mux2 dut (.in0(in0), .in1(in1), .sel(sel), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      in0 = 8'($urandom);
      in1 = 8'($urandom);
      sel = i[0];
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("mismatch sel=%0b in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
