// tb_i281e_data_memory: random writes and reads over several banks against a
// shadow copy; the byte at an address depends on the bank, and address bit 7
// is not decoded.
`timescale 1ns/1ps
module tb_i281e_data_memory;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] addr = 0, bank = 0, wdata = 0, rdata;
  logic [7:0] shadow [int];
  int checks = 0, failures = 0, hits = 0;

  i281e_data_memory dut (.clk, .en, .addr, .bank, .we, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6000; k++) begin
      int key;
      @(negedge clk);
      en = ($urandom % 4) != 0; we = 1'($urandom);
      addr = 8'($urandom % 16) | (8'($urandom % 2) << 7);
      bank = 8'($urandom % 3) * 8'd85;     // banks 0, 85, 170
      wdata = 8'($urandom);
      key = {bank, addr[6:0]};
      #1;
      if (shadow.exists(key)) begin
        checks++; hits++;
        if (rdata !== shadow[key]) begin failures++; $display("FAIL read %h/%h", bank, addr); end
      end
      @(posedge clk);
      if (en && we) shadow[key] = wdata;
    end
    checks++; if (hits < 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
