// tb_flags_register: drives random flag values and write enables for 2000
// clocks after reset and compares the register with a model that holds its
// value when write_enable is 0 and loads d on the clock edge when it is 1.
module tb_flags_register;
  import i281_pkg::*;
  logic   clk = 0, rst_n = 0, we = 0;
  flags_t d = '0, q, model;
  int checks = 0, failures = 0, holds = 0, loads = 0;

  flags_register dut (.clk(clk), .rst_n(rst_n), .write_enable(we), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("reset value %b", q); end
    model = '0;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      d  = flags_t'($urandom);
      we = ($urandom % 3) == 0;
      @(posedge clk);
      if (we) begin model = d; loads++; end else holds++;
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch cycle %0d q=%b model=%b", i, q, model);
      end
    end
    if (holds == 0 || loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
