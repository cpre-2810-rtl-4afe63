// tb_i281_sum: the i281 CPU at its default parameters runs the example
// program that adds the numbers from 1 to 5 (N = 5 in data byte 0). The
// program is 3 set-up instructions, 5 loop passes of CMP, BRG, ADD, ADDI,
// JUMP and the final CMP, BRG (taken) and STORE: 31 instructions, so after
// 31 clocks sum (data byte 2) must be 15 and not earlier, with A = 6, B = 15,
// D = 5 and the PC at 101001. BRG must be skipped 5 times and taken once.
module tb_i281_sum;
  import i281_pkg::*;
  logic   clk = 0, rst_n = 0;
  instr_t code_sw = '0;
  data_t  data_sw = '0;
  pc_t    pc;
  instr_t instr;
  flags_t flags;
  data_t  regs [NUM_REGS];
  data_t  dmem [DMEM_DEPTH];
  int checks = 0, failures = 0, brg_taken = 0, brg_skipped = 0;

  i281_cpu dut (.clk(clk), .rst_n(rst_n), .code_switches(code_sw), .data_switches(data_sw),
                .pc(pc), .instr(instr), .flags(flags), .regs(regs), .dmem(dmem));

  always #5 clk = ~clk;

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s = %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    expect_eq("start PC", int'(pc), 32);
    expect_eq("N", int'(dmem[0]), 5);
    for (int cyc = 1; cyc <= 31; cyc++) begin
      if (pc == 6'b100100) begin
        // BRG End: taken exactly when i > N.
        if (regs[0] > regs[3]) brg_taken++; else brg_skipped++;
      end
      @(negedge clk);
      if (cyc < 31) begin
        checks++;
        if (dmem[2] != 0) begin failures++; $display("sum written early, cycle %0d", cyc); end
      end
    end
    expect_eq("sum", int'(dmem[2]), 15);
    expect_eq("A (i)", int'(regs[0]), 6);
    expect_eq("B (sum)", int'(regs[1]), 15);
    expect_eq("D (N)", int'(regs[3]), 5);
    expect_eq("PC after STORE", int'(pc), 6'b101001);
    expect_eq("BRG taken", brg_taken, 1);
    expect_eq("BRG skipped", brg_skipped, 5);
    $display("sum of 1..5 = %0d after 31 clocks", dmem[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
