// tb_i281e_code_writeback: C3 low gives the switches; C3 high gives
// {CACHE, data}; CACHE loads only with C3 set, C1 clear and the clock enable.
`timescale 1ns/1ps
module tb_i281e_code_writeback;
  logic clk = 0, rst_n = 0, en = 0, prgm = 0, code_we = 0;
  logic [15:0] switches = 0, out;
  logic [7:0]  data = 0, cache, exp_cache;
  int checks = 0, failures = 0;

  i281e_code_writeback dut (.clk, .rst_n, .en, .prgm, .code_we, .switches, .data, .out, .cache);
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
    exp_cache = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      en = 1'($urandom); prgm = 1'($urandom); code_we = 1'($urandom);
      switches = 16'($urandom); data = 8'($urandom);
      #1;
      checks++;
      if (out !== (prgm ? {exp_cache, data} : switches)) begin
        failures++; $display("FAIL out %h", out);
      end
      @(posedge clk); #1;
      if (en && prgm && !code_we) exp_cache = data;
      checks++;
      if (cache !== exp_cache) begin failures++; $display("FAIL cache %h exp %h", cache, exp_cache); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
