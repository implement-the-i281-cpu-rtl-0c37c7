// i281e_cpu: top level of the i281e, a single-cycle 8-bit teaching CPU.
//
// Each enabled clock fetches one 16-bit instruction from code memory at the
// PC, decodes its opcode byte in the control table and completes it before the
// next edge. The data path, as in the design:
//   register port 0 -> ALU input A; C11 mux (port 1 or immediate) -> ALU input B
//   C15 mux (ALU result or immediate) -> data-memory address, code-memory select
//     (write address / bank value) and the PC's branch offset
//   C16 mux (port 1 or switches low byte) -> data-memory input and the low byte
//     of the code-writeback word
//   C18 mux (C15 mux or data-memory output) -> register write data
// The clock module turns the 1.8432 MHz oscillator into a CPU clock enable
// (run at a chosen rate or single step). All state changes on the rising edge
// of clk when that enable is high; rst_n is an asynchronous active-low reset
// that starts execution at address 0 of the boot ROM. The dbg port carries
// the values the board shows on its LEDs. Compact flash, serial, expansion bus
// and display hardware are outside this module.
module i281e_cpu
  import i281e_pkg::*;
#(
  parameter int unsigned CODE_BANKS = 256,
  parameter int unsigned DATA_BANKS = 256,
  parameter string       BIOS_FILE  = "rtl/i281e_bios.hex"
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] switches,
  input  logic        run,
  input  logic        step,
  input  logic [3:0]  div_sel,
  output debug_t      dbg
);
  logic        en;
  logic [7:0]  pc, next_pc;
  logic [15:0] isr, cw_out;
  logic [7:0]  imm;
  ctrl_t       ctrl;
  flags_t      flags_q, alu_flags;
  logic [7:0]  port0, port1, alu_b, alu_result;
  logic [7:0]  c15_out, c16_out, c18_out, dmem_out;
  logic [7:0]  bank, cache;
  logic [7:0]  regs [4];

  assign imm = isr[7:0];

  i281e_clock u_clock (
    .clk, .rst_n, .run, .step, .div_sel, .cpu_en(en)
  );

  i281e_pc u_pc (
    .clk, .rst_n, .en, .branch(ctrl.c2_branch), .offset(c15_out), .pc, .next_pc
  );

  i281e_code_memory #(.BANKS(CODE_BANKS), .BANK_WORDS(128), .BIOS_FILE(BIOS_FILE)) u_cmem (
    .clk, .rst_n, .en, .pc, .isr, .select(c15_out), .bank_we(ctrl.c0_bank_we),
    .we(ctrl.c1_code_we), .wdata(cw_out), .bank
  );

  i281e_code_writeback u_cwb (
    .clk, .rst_n, .en, .prgm(ctrl.c3_prgm), .code_we(ctrl.c1_code_we),
    .switches, .data(c16_out), .out(cw_out), .cache
  );

  i281e_control u_ctrl (.opcode(isr[15:8]), .flags(flags_q), .ctrl);

  i281e_regfile #(.NREGS(4)) u_regs (
    .clk, .rst_n, .en, .rp0(ctrl.c45_rp0), .rp1(ctrl.c67_rp1), .wp(ctrl.c89_wp),
    .we(ctrl.c10_reg_we), .wdata(c18_out), .port0, .port1, .regs
  );

  i281e_mux2 #(.WIDTH(8)) u_c11_mux (.sel(ctrl.c11_alu_b_imm), .in0(port1), .in1(imm), .out(alu_b));

  i281e_alu u_alu (.a(port0), .b(alu_b), .sel(ctrl.c1213_alu_op), .result(alu_result), .flags(alu_flags));

  i281e_flags u_flags (.clk, .rst_n, .en, .we(ctrl.c14_flags_we), .d(alu_flags), .q(flags_q));

  i281e_mux2 #(.WIDTH(8)) u_c15_mux (.sel(ctrl.c15_imm), .in0(alu_result), .in1(imm), .out(c15_out));

  i281e_mux2 #(.WIDTH(8)) u_c16_mux (.sel(ctrl.c16_switches), .in0(port1), .in1(switches[7:0]), .out(c16_out));

  i281e_data_memory #(.BANKS(DATA_BANKS), .BANK_BYTES(128)) u_dmem (
    .clk, .en, .addr(c15_out), .bank, .we(ctrl.c17_dmem_we), .wdata(c16_out), .rdata(dmem_out)
  );

  i281e_mux2 #(.WIDTH(8)) u_c18_mux (.sel(ctrl.c18_dmem_rd), .in0(c15_out), .in1(dmem_out), .out(c18_out));

  always_comb begin
    dbg.pc          = pc;
    dbg.next_pc     = next_pc;
    dbg.instruction = isr;
    dbg.ctrl        = ctrl;
    dbg.reg_a       = regs[0];
    dbg.reg_b       = regs[1];
    dbg.reg_c       = regs[2];
    dbg.reg_d       = regs[3];
    dbg.port0       = port0;
    dbg.port1       = port1;
    dbg.alu_b       = alu_b;
    dbg.alu_result  = alu_result;
    dbg.flags       = flags_q;
    dbg.c15_out     = c15_out;
    dbg.c16_out     = c16_out;
    dbg.dmem_out    = dmem_out;
    dbg.c18_out     = c18_out;
    dbg.bank        = bank;
    dbg.cache       = cache;
  end
endmodule
