// tb_i281e_regfile: random reads and writes against a shadow copy of A-D;
// checks both read ports every cycle and that writes need both en and C10.
`timescale 1ns/1ps
module tb_i281e_regfile;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [1:0] rp0, rp1, wp;
  logic [7:0] wdata, port0, port1;
  logic [7:0] regs [4];
  logic [7:0] shadow [4];
  int checks = 0, failures = 0;

  i281e_regfile #(.NREGS(4)) dut (.clk, .rst_n, .en, .rp0, .rp1, .wp, .we, .wdata, .port0, .port1, .regs);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shadow = '{default: 0};
    rp0 = 0; rp1 = 0; wp = 0; wdata = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      rp0 = 2'($urandom); rp1 = 2'($urandom); wp = 2'($urandom);
      en = ($urandom % 4) != 0; we = 1'($urandom); wdata = 8'($urandom);
      #1;
      checks++;
      if (port0 !== shadow[rp0] || port1 !== shadow[rp1]) begin
        failures++;
        $display("FAIL read rp0 %0d=%h rp1 %0d=%h", rp0, port0, rp1, port1);
      end
      @(posedge clk);
      if (en && we) shadow[wp] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
