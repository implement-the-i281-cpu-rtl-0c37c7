// i281e_code_memory: instruction memory of the i281e with its bank register.
//
// The 8-bit code address space has two halves. Addresses 0x00-0x7F read the
// 128-word boot ROM. Addresses 0x80-0xFF are a window onto one BANK_WORDS-word
// bank of the code RAM (BANKS banks, 32 K words at the defaults); the bank
// register picks which. The PC addresses the instruction register output
// (isr, combinational read); the 'select' input (the C15 mux output) is the
// address for writes and the value loaded into the bank register.
//   C0 (bank_we): bank <- select on the enabled clock edge.
//   C1 (we):      code[select] <- wdata on the enabled clock edge; writes to
//                 the ROM half are ignored.
// The BIOS size, the code RAM size, the bank count, and the C0 and C1 signal
// roles follow the design. That the ROM sits at the bottom and the RAM window
// at the top, and that one bank register also serves the data memory, are
// this implementation's reading of the banking scheme. The bank register
// resets to 0; the RAM is not reset.
module i281e_code_memory #(
  parameter int unsigned BANKS      = 256,
  parameter int unsigned BANK_WORDS = 128,
  parameter string       BIOS_FILE  = "rtl/i281e_bios.hex"
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [7:0]  pc,
  output logic [15:0] isr,
  input  logic [7:0]  select,
  input  logic        bank_we,
  input  logic        we,
  input  logic [15:0] wdata,
  output logic [7:0]  bank
);
  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned OW = $clog2(BANK_WORDS);

  logic [15:0] ram [BANKS*BANK_WORDS];
  logic [15:0] rom_data;
  logic [BW+OW-1:0] fetch_addr, write_addr;

  i281e_boot_rom #(.WORDS(128), .INIT_FILE(BIOS_FILE)) u_bios (
    .addr(pc[6:0]), .data(rom_data)
  );

  always_comb begin
    fetch_addr = {bank[BW-1:0], pc[OW-1:0]};
    write_addr = {bank[BW-1:0], select[OW-1:0]};
    isr        = pc[7] ? ram[fetch_addr] : rom_data;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)             bank <= '0;
    else if (en && bank_we) bank <= select;

  always_ff @(posedge clk)
    if (en && we && select[7]) ram[write_addr] <= wdata;
endmodule
