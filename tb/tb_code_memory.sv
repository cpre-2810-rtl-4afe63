// tb_code_memory: loads a known image at reset (word i = i * 1021 mod 65536),
// checks every word through the read port, then does 2000 cycles of random
// writes and reads against a model array.
module tb_code_memory;
  import i281_pkg::*;

  function automatic code_image_t test_image();
    code_image_t img;
    for (int i = 0; i < CODE_DEPTH; i++) img[i] = instr_t'(i * 1021);
    return img;
  endfunction

  localparam code_image_t IMG = test_image();

  logic   clk = 0, rst_n = 0, we = 0;
  pc_t    raddr = 0, waddr = 0;
  instr_t rdata, wdata = 0;
  instr_t model [CODE_DEPTH];
  int checks = 0, failures = 0, writes = 0;

  code_memory #(.INIT(IMG)) dut (.clk(clk), .rst_n(rst_n), .raddr(raddr), .rdata(rdata),
                                 .write_enable(we), .waddr(waddr), .wdata(wdata));

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
    for (int i = 0; i < CODE_DEPTH; i++) begin
      model[i] = instr_t'(i * 1021);
      raddr = pc_t'(i);
      #1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("init word %0d = %h", i, rdata); end
    end
    for (int i = 0; i < 2000; i++) begin
      raddr = pc_t'($urandom); waddr = pc_t'($urandom);
      we = ($urandom % 2); wdata = instr_t'($urandom);
      #1;
      checks++;
      if (rdata !== model[raddr]) begin
        failures++;
        $display("read mismatch addr=%0d %h/%h", raddr, rdata, model[raddr]);
      end
      @(posedge clk);
      if (we) begin model[waddr] = wdata; writes++; end
      @(negedge clk);
    end
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
