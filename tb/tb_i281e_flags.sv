// tb_i281e_flags: the flag register loads only on an enabled edge with C14 set,
// holds otherwise, and clears on reset.
`timescale 1ns/1ps
module tb_i281e_flags;
  import i281e_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  flags_t d, q, expq;
  int checks = 0, failures = 0;

  i281e_flags dut (.clk, .rst_n, .en, .we, .d, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    repeat (2) @(posedge clk);
    checks++; if (q !== 4'b0000) failures++;
    @(negedge clk) rst_n = 1;
    expq = '0;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom); d = 4'($urandom);
      @(posedge clk); #1;
      if (en && we) expq = d;
      checks++;
      if (q !== expq) begin failures++; $display("FAIL q %b exp %b", q, expq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
