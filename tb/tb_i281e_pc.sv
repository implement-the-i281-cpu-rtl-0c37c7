// tb_i281e_pc: the PC steps by one per enabled clock, holds without enable,
// and on C2 goes to PC + 1 + offset (the design's example: JUMP with operand
// 0x0B at PC 0x00 leads to 0x0C).
`timescale 1ns/1ps
module tb_i281e_pc;
  logic clk = 0, rst_n = 0, en = 0, branch = 0;
  logic [7:0] offset = 0, pc, next_pc, exp_pc;
  int checks = 0, failures = 0;

  i281e_pc dut (.clk, .rst_n, .en, .branch, .offset, .pc, .next_pc);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (pc !== 8'h00) failures++;
    // example from the design: JUMP 0x0B at PC 0 -> 0x0C
    en = 1; branch = 1; offset = 8'h0B;
    #1 checks++; if (next_pc !== 8'h0C) failures++;
    @(posedge clk); #1;
    checks++; if (pc !== 8'h0C) failures++;
    exp_pc = 8'h0C;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      en = 1'($urandom); branch = 1'($urandom); offset = 8'($urandom);
      @(posedge clk); #1;
      if (en) exp_pc = branch ? 8'(exp_pc + 1 + offset) : 8'(exp_pc + 1);
      checks++;
      if (pc !== exp_pc) begin failures++; $display("FAIL pc %h exp %h", pc, exp_pc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
