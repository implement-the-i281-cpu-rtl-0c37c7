// i281e_boot_rom: the i281e boot (BIOS) ROM, WORDS x 16 bits.
//
// In the design the BIOS is two byte-wide ROMs (BIOS HIGH and BIOS LOW) that
// together hold 128 sixteen-bit instructions at the bottom of the code address
// space; this module models them as one 16-bit ROM with a combinational read.
// Its contents are loaded from INIT_FILE (one 16-bit hex word per line). The
// default file holds a self-check program of this implementation's own; the
// design's BIOS code is not reproduced. Word addresses beyond the file read 0.
module i281e_boot_rom #(
  parameter int unsigned WORDS     = 128,
  parameter string       INIT_FILE = "rtl/i281e_bios.hex"
) (
  input  logic [$clog2(WORDS)-1:0] addr,
  output logic [15:0]              data
);
  logic [15:0] rom [WORDS];

  initial begin
    rom = '{default: '0};
    if (INIT_FILE != "") $readmemh(INIT_FILE, rom);
  end

  always_comb data = rom[addr];
endmodule
