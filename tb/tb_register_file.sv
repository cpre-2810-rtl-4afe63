// tb_register_file: after reset all four registers must read 0; then 3000
// clocks of random selects, write enables and data are compared on both
// read ports and the debug outputs with a four-entry model, including reads
// of the register written in the previous cycle.
module tb_register_file;
  import i281_pkg::*;
  logic       clk = 0, rst_n = 0, we = 0;
  logic [1:0] s0 = 0, s1 = 0, ws = 0;
  data_t      wdata = 0, p0, p1;
  data_t      regs [4];
  data_t      model [4];
  int checks = 0, failures = 0, writes = 0;

  register_file dut (.clk(clk), .rst_n(rst_n), .port0_select(s0), .port1_select(s1),
                     .write_select(ws), .write_enable(we), .wdata(wdata),
                     .port0(p0), .port1(p1), .regs(regs));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 3000; i++) begin
      s0 = 2'($urandom); s1 = 2'($urandom); ws = 2'($urandom);
      we = $urandom % 2; wdata = 8'($urandom);
      #1;
      checks++;
      if (p0 !== model[s0] || p1 !== model[s1]) begin
        failures++;
        $display("read mismatch s0=%0d p0=%h/%h s1=%0d p1=%h/%h", s0, p0, model[s0], s1, p1, model[s1]);
      end
      foreach (model[k]) begin
        checks++;
        if (regs[k] !== model[k]) failures++;
      end
      @(posedge clk);
      if (we) begin model[ws] = wdata; writes++; end
      @(negedge clk);
    end
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
