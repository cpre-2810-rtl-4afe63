// tb_data_memory: checks the reset image (the example data N = 5, 0, 0 ...)
// then 2000 cycles of random 8-bit addresses (only the low four bits select
// a byte), writes and reads against a 16-byte model.
module tb_data_memory;
  import i281_pkg::*;
  logic  clk = 0, rst_n = 0, we = 0;
  data_t addr = 0, rdata, wdata = 0;
  data_t mem_o [DMEM_DEPTH];
  data_t model [DMEM_DEPTH];
  int checks = 0, failures = 0, writes = 0;

  data_memory #(.INIT(sum_1_to_5_data())) dut (.clk(clk), .rst_n(rst_n), .addr(addr),
      .rdata(rdata), .write_enable(we), .wdata(wdata), .mem_o(mem_o));

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
    foreach (model[i]) model[i] = (i == 0) ? 8'd5 : 8'd0;
    for (int i = 0; i < 2000; i++) begin
      addr = 8'($urandom); we = $urandom % 2; wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== model[addr % DMEM_DEPTH]) begin
        failures++;
        $display("read mismatch addr=%0d %h/%h", addr, rdata, model[addr % DMEM_DEPTH]);
      end
      foreach (model[k]) begin
        checks++;
        if (mem_o[k] !== model[k]) failures++;
      end
      @(posedge clk);
      if (we) begin model[addr % DMEM_DEPTH] = wdata; writes++; end
      @(negedge clk);
    end
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
