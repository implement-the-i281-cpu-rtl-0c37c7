// i281e_pkg: types and constants shared by the i281e CPU modules.
//
// The i281e executes one 16-bit instruction per clock. The high byte (opcode)
// is split into a 4-bit group and a 4-bit argument whose two 2-bit halves name
// registers; the low byte is the immediate operand. The control table turns
// the opcode and the four condition flags into nineteen control signals C0-C18
// whose roles (bank write, code write, branch, program, register ports, ALU
// operation, flag write, the four data-path multiplexers, data-memory write and
// read) follow the i281e design. The bit encodings of the enums below, and the
// flag order C,O,N,Z (bit 3 down to bit 0), follow that design's panel labels;
// the packing of the control word into a struct is this implementation's own.
package i281e_pkg;

  // ALU operation, driven by C12 (ALU_SELECT_1) and C13 (ALU_SELECT_0).
  typedef enum logic [1:0] {
    ALU_NOR = 2'b00,   // shifter input is the bitwise NOR of A and B
    ALU_SHR = 2'b01,   // A shifted right by one
    ALU_ADD = 2'b10,
    ALU_SUB = 2'b11
  } alu_op_e;

  // Register numbers as used in the opcode fields.
  typedef enum logic [1:0] {REG_A = 2'd0, REG_B = 2'd1, REG_C = 2'd2, REG_D = 2'd3} reg_e;

  // Condition flags, shown on the panel in the order C O N Z.
  typedef struct packed {
    logic c;   // carry (not-borrow after a subtraction, shifted-out bit after SHIFTR)
    logic o;   // signed overflow of an add or subtract
    logic n;   // bit 7 of the result
    logic z;   // result is zero
  } flags_t;

  // The nineteen control signals, named after their function.
  typedef struct packed {
    logic    c0_bank_we;     // load the bank register from the C15 mux
    logic    c1_code_we;     // write the code-writeback word into code memory
    logic    c2_branch;      // PC <- PC + 1 + C15 mux
    logic    c3_prgm;        // code writeback: use {CACHE, data} / load CACHE
    reg_e    c45_rp0;        // register read port 0 select
    reg_e    c67_rp1;        // register read port 1 select
    reg_e    c89_wp;         // register write select
    logic    c10_reg_we;     // register write enable
    logic    c11_alu_b_imm;  // ALU input B: 0 = port 1, 1 = immediate
    alu_op_e c1213_alu_op;   // ALU operation
    logic    c14_flags_we;   // flags register write enable
    logic    c15_imm;        // C15 mux: 0 = ALU result, 1 = immediate
    logic    c16_switches;   // C16 mux: 0 = port 1, 1 = switches low byte
    logic    c17_dmem_we;    // data memory write
    logic    c18_dmem_rd;    // C18 mux: 0 = C15 mux, 1 = data memory output
  } ctrl_t;


  // Opcode groups (upper four bits of the opcode).
  typedef enum logic [3:0] {
    GRP_BANK   = 4'h0, GRP_INPUT  = 4'h1, GRP_MOVE   = 4'h2, GRP_LOADI  = 4'h3,
    GRP_ADD    = 4'h4, GRP_ADDI   = 4'h5, GRP_SUB    = 4'h6, GRP_SUBI   = 4'h7,
    GRP_LOAD   = 4'h8, GRP_LOADF  = 4'h9, GRP_STORE  = 4'hA, GRP_STOREF = 4'hB,
    GRP_NORI   = 4'hC, GRP_CMP    = 4'hD, GRP_NOR    = 4'hE, GRP_BRANCH = 4'hF
  } group_e;

  // Debug view of the data path and control path, as shown on the LED panel.
  typedef struct packed {
    logic [7:0]  pc;
    logic [7:0]  next_pc;
    logic [15:0] instruction;
    ctrl_t       ctrl;
    logic [7:0]  reg_a, reg_b, reg_c, reg_d;
    logic [7:0]  port0, port1;
    logic [7:0]  alu_b;
    logic [7:0]  alu_result;
    flags_t      flags;
    logic [7:0]  c15_out;        // data-memory address / code select
    logic [7:0]  c16_out;        // data-memory input
    logic [7:0]  dmem_out;
    logic [7:0]  c18_out;        // register input
    logic [7:0]  bank;
    logic [7:0]  cache;
  } debug_t;

endpackage
