// tb_i281e_boot_rom: the ROM returns the words of its image file, read here
// separately, at every address, and 0 beyond the end of the file.
`timescale 1ns/1ps
module tb_i281e_boot_rom;
  logic [6:0]  addr;
  logic [15:0] data;
  logic [15:0] image [128];
  int checks = 0, failures = 0;

  i281e_boot_rom dut (.addr, .data);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nz = 0;
    image = '{default: '0};
    $readmemh("rtl/i281e_bios.hex", image);
    for (int i = 0; i < 128; i++) begin
      addr = 7'(i);
      #1;
      checks++;
      if (data !== image[i]) begin failures++; $display("FAIL addr %0d", i); end
      if (data != 0) nz++;
    end
    // first word of the image is LOADI A,5
    checks++; addr = 0; #1; if (data !== 16'h3005) failures++;
    checks++; if (nz < 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
