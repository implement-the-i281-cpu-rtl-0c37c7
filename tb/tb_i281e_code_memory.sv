// tb_i281e_code_memory: code memory with its bank register.
//
// Checks that addresses 0x00-0x7F read the boot ROM image, that writes into
// 0x80-0xFF land in the bank chosen by the bank register and read back through
// the PC window only while that bank is selected, that writes to the ROM half
// change nothing, and that the bank register loads only with C0 and enable.
`timescale 1ns/1ps
module tb_i281e_code_memory;
  logic clk = 0, rst_n = 0, en = 0, bank_we = 0, we = 0;
  logic [7:0]  pc = 0, select = 0, bank;
  logic [15:0] isr, wdata = 0;
  logic [15:0] image [128];
  logic [15:0] shadow [int];
  logic [7:0]  exp_bank;
  int checks = 0, failures = 0;

  i281e_code_memory dut (.clk, .rst_n, .en, .pc, .isr, .select, .bank_we, .we, .wdata, .bank);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    image = '{default: '0};
    $readmemh("rtl/i281e_bios.hex", image);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (bank !== 8'h00) failures++;
    for (int i = 0; i < 128; i++) begin
      pc = 8'(i); #1;
      checks++; if (isr !== image[i]) begin failures++; $display("FAIL rom %0d", i); end
    end
    exp_bank = 0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      bank_we = ($urandom % 8) == 0;
      we = 1'($urandom);
      select = (bank_we) ? 8'($urandom % 4) : 8'($urandom);   // stay in four banks
      wdata = 16'($urandom);
      pc = 8'($urandom);
      #1;
      checks++;
      if (pc[7]) begin
        int key;
        key = {exp_bank, pc[6:0]};
        if (shadow.exists(key) && isr !== shadow[key]) begin
          failures++; $display("FAIL ram read pc %h bank %h", pc, exp_bank);
        end
      end else if (isr !== image[pc[6:0]]) begin
        failures++; $display("FAIL rom read pc %h", pc);
      end
      @(posedge clk); #1;
      if (en && we && select[7]) shadow[int'({exp_bank, select[6:0]})] = wdata;
      if (en && bank_we) exp_bank = select;
      checks++;
      if (bank !== exp_bank) begin failures++; $display("FAIL bank %h exp %h", bank, exp_bank); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
