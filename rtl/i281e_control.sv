// i281e_control: control table (instruction decoder) of the i281e.
//
// Combinational. The opcode is the instruction's high byte: op[7:4] is the
// group, op[3:2] and op[1:0] are register fields X and Y. Together with the
// flags it gives the nineteen control signals; the operand byte never affects
// them. Every instruction completes in one clock.
//
// Group by group (X = op[3:2], Y = op[1:0], imm = operand byte):
//   0  BANK X+imm        bank <- X + imm                          (op[1:0] = 0)
//   1  INPUTC [imm]      code[imm] <- switches                     op 10
//      INPUTCF [X+imm]   code[X+imm] <- switches                   op 11,15,19,1D
//      INPUTD [imm]      data[imm] <- switches low byte            op 12
//      INPUTDF [X+imm]   data[X+imm] <- switches low byte          op 13,17,1B,1F
//      CACHE A           CACHE <- A                                op 14
//      WRITE [X+imm],A   code[X+imm] <- {CACHE, A}                 op 16,1A,1E
//   2  MOV X,Y           X <- Y + imm (the operand is 0)
//   3  LOADI X,imm       X <- imm
//   4/5 ADD X,Y / ADDI   X <- X + Y / X + imm, flags
//   6/7 SUB X,Y / SUBI   X <- X - Y / X - imm, flags
//   8  LOAD X,[imm]      X <- data[imm]
//   9  LOADF X,[Y+imm]   X <- data[Y+imm]
//   A  STORE [imm],X     data[imm] <- X
//   B  STOREF [Y+imm],X  data[Y+imm] <- X
//   C  NORI X,imm / SHIFTR X (op[1:0] = 0 / 1), flags
//   D  CMP X,Y           flags of X - Y
//   E  NOR X,Y           X <- ~(X | Y), flags
//   F  conditional branches on C,O,N,Z (op F0-FD), JUMPR C+imm (FE),
//      JUMP imm (FF); the taken target is PC + 1 + (C15 mux output).
// The instruction set, the meaning of each control signal and the JUMP row
// (only C2 and C15 set) follow the i281e design. The rest of the table, and
// the readings below, are this implementation's:
//   * MOV passes Y through the adder with the immediate, so MOV needs a zero
//     operand byte; JUMPR adds C + imm in the ALU and branches by that amount
//     relative to PC + 1, reusing the branch adder.
//   * C3 selects the code-writeback source ({CACHE, data} instead of the
//     switches) and, without C1, loads CACHE.
//   * Flags are written by ADD, ADDI, SUB, SUBI, CMP, NOR, NORI and SHIFTR.
//   * Opcodes the table leaves empty ("---") do nothing (all signals 0).
// Immediate assertions at the end check three consistency rules of the table.
module i281e_control
  import i281e_pkg::*;
(
  input  logic [7:0] opcode,
  input  flags_t     flags,
  output ctrl_t      ctrl
);
  group_e grp;
  reg_e   x, y;
  logic   cond;

  always_comb begin
    grp  = group_e'(opcode[7:4]);
    x    = reg_e'(opcode[3:2]);
    y    = reg_e'(opcode[1:0]);
    ctrl = '0;

    // branch condition for group F
    unique case (opcode[3:0])
      4'h0: cond = flags.c;                              // BRC / BRAE
      4'h1: cond = !flags.c;                             // BRNC / BRB
      4'h2: cond = flags.o;                              // BRO
      4'h3: cond = !flags.o;                             // BRNO
      4'h4: cond = flags.n;                              // BRN
      4'h5: cond = !flags.n;                             // BRNN / BRP
      4'h6: cond = flags.z;                              // BRZ / BRE
      4'h7: cond = !flags.z;                             // BRNZ / BRNE
      4'h8: cond = flags.c && !flags.z;                  // BRA
      4'h9: cond = !flags.c || flags.z;                  // BRBE
      4'hA: cond = !flags.z && (flags.n == flags.o);     // BRG
      4'hB: cond = (flags.n == flags.o);                 // BRGE
      4'hC: cond = (flags.n != flags.o);                 // BRL
      4'hD: cond = flags.z || (flags.n != flags.o);      // BRLE
      default: cond = 1'b1;                              // JUMPR, JUMP
    endcase

    unique case (grp)
      GRP_BANK: if (y == REG_A) begin
        ctrl.c45_rp0 = x; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
        ctrl.c0_bank_we = 1'b1;
      end
      GRP_INPUT: begin
        unique case (opcode[3:0])
          4'h0: begin ctrl.c15_imm = 1'b1; ctrl.c1_code_we = 1'b1; end
          4'h2: begin ctrl.c15_imm = 1'b1; ctrl.c16_switches = 1'b1; ctrl.c17_dmem_we = 1'b1; end
          4'h1, 4'h5, 4'h9, 4'hD: begin
            ctrl.c45_rp0 = x; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
            ctrl.c1_code_we = 1'b1;
          end
          4'h3, 4'h7, 4'hB, 4'hF: begin
            ctrl.c45_rp0 = x; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
            ctrl.c16_switches = 1'b1; ctrl.c17_dmem_we = 1'b1;
          end
          4'h4: begin ctrl.c67_rp1 = REG_A; ctrl.c3_prgm = 1'b1; end
          4'h6, 4'hA, 4'hE: begin
            ctrl.c45_rp0 = x; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
            ctrl.c67_rp1 = REG_A; ctrl.c3_prgm = 1'b1; ctrl.c1_code_we = 1'b1;
          end
          default: ;
        endcase
      end
      GRP_MOVE: begin
        ctrl.c45_rp0 = y; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
        ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_LOADI: if (y == REG_A) begin
        ctrl.c15_imm = 1'b1; ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_ADD, GRP_SUB, GRP_NOR: begin
        ctrl.c45_rp0 = x; ctrl.c67_rp1 = y;
        ctrl.c1213_alu_op = (grp == GRP_ADD) ? ALU_ADD : (grp == GRP_SUB) ? ALU_SUB : ALU_NOR;
        ctrl.c14_flags_we = 1'b1; ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_ADDI, GRP_SUBI: if (y == REG_A) begin
        ctrl.c45_rp0 = x; ctrl.c11_alu_b_imm = 1'b1;
        ctrl.c1213_alu_op = (grp == GRP_ADDI) ? ALU_ADD : ALU_SUB;
        ctrl.c14_flags_we = 1'b1; ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_NORI: if (opcode[1] == 1'b0) begin
        ctrl.c45_rp0 = x; ctrl.c11_alu_b_imm = 1'b1;
        ctrl.c1213_alu_op = opcode[0] ? ALU_SHR : ALU_NOR;
        ctrl.c14_flags_we = 1'b1; ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_CMP: begin
        ctrl.c45_rp0 = x; ctrl.c67_rp1 = y; ctrl.c1213_alu_op = ALU_SUB;
        ctrl.c14_flags_we = 1'b1;
      end
      GRP_LOAD: if (y == REG_A) begin
        ctrl.c15_imm = 1'b1; ctrl.c18_dmem_rd = 1'b1;
        ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_LOADF: begin
        ctrl.c45_rp0 = y; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
        ctrl.c18_dmem_rd = 1'b1; ctrl.c89_wp = x; ctrl.c10_reg_we = 1'b1;
      end
      GRP_STORE: if (y == REG_A) begin
        ctrl.c15_imm = 1'b1; ctrl.c67_rp1 = x; ctrl.c17_dmem_we = 1'b1;
      end
      GRP_STOREF: begin
        ctrl.c45_rp0 = y; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
        ctrl.c67_rp1 = x; ctrl.c17_dmem_we = 1'b1;
      end
      GRP_BRANCH: begin
        if (opcode[3:0] == 4'hE) begin   // JUMPR C+imm
          ctrl.c45_rp0 = REG_C; ctrl.c11_alu_b_imm = 1'b1; ctrl.c1213_alu_op = ALU_ADD;
        end else begin
          ctrl.c15_imm = 1'b1;
        end
        ctrl.c2_branch = cond;
      end
      default: ;
    endcase
  end

  // Consistency rules of the table: a data-memory read always feeds a register
  // write, one instruction never writes both memories, and the data-memory
  // input switches only while data memory is written.
  always_comb begin
    assert (!ctrl.c18_dmem_rd || ctrl.c10_reg_we);
    assert (!(ctrl.c1_code_we && ctrl.c17_dmem_we));
    assert (!ctrl.c16_switches || ctrl.c17_dmem_we);
  end
endmodule
