// tb_i281e_control: checks the control table.
//
// 1. Full control words C0..C18, worked out by hand from the instruction
//    definitions, for one opcode of each kind, including the design's own
//    printed row for JUMP (only C2 and C15 set) and an unused opcode.
// 2. Every conditional branch: for random pairs (a, b) the flags of a - b are
//    formed here, and the branch must be taken exactly when the comparison it
//    names (equal, above, greater, ...) holds for a and b.
// 3. Register-writing and flag-writing groups raise C10 and C14 for every
//    argument value.
`timescale 1ns/1ps
module tb_i281e_control;
  import i281e_pkg::*;
  logic [7:0] opcode;
  flags_t     flags;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  i281e_control dut (.opcode, .flags, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // C0 is the leftmost character
  task automatic row(input logic [7:0] op, input string c);
    logic [18:0] exp;
    int k = 0;
    for (int i = 0; i < c.len(); i++)
      if (c[i] == "0" || c[i] == "1") begin exp[18 - k] = (c[i] == "1"); k++; end
    opcode = op; flags = '0;
    #1;
    checks++;
    if (k != 19 || ctrl !== exp) begin
      failures++;
      $display("FAIL opcode %h: %b expected %b", op, ctrl, exp);
    end
  endtask

  initial begin
    //        C0-3   C45 C67 C89 C10 C11 C1213 C14 C15-18
    row(8'h46, "0000 01 10 01 1 0 10 1 0000");   // ADD B,C
    row(8'h3C, "0000 00 00 11 1 0 00 0 1000");   // LOADI D,imm
    row(8'h88, "0000 00 00 10 1 0 00 0 1001");   // LOAD C,[imm]
    row(8'hB7, "0000 11 01 00 0 1 10 0 0010");   // STOREF [D+imm],B
    row(8'h12, "0000 00 00 00 0 0 00 0 1110");   // INPUTD [imm]
    row(8'h1A, "0101 10 00 00 0 1 10 0 0000");   // WRITE [C+imm],A
    row(8'h14, "0001 00 00 00 0 0 00 0 0000");   // CACHE A
    row(8'h04, "1000 01 00 00 0 1 10 0 0000");   // BANK B+imm
    row(8'hC9, "0000 10 00 10 1 1 01 1 0000");   // SHIFTR C
    row(8'hD3, "0000 00 11 00 0 0 11 1 0000");   // CMP A,D
    row(8'hFF, "0010 00 00 00 0 0 00 0 1000");   // JUMP (the design's row)
    row(8'h01, "0000 00 00 00 0 0 00 0 0000");   // unused

    // conditional branches against the comparison they name
    for (int k = 0; k < 3000; k++) begin
      logic [7:0] a, b, r;
      int sa, sb;
      bit exp;
      a = 8'($urandom); b = (k % 5 == 0) ? a : 8'($urandom);
      sa = $signed(a); sb = $signed(b);
      r = a - b;
      flags.c = (a >= b);
      flags.o = (sa - sb > 127) || (sa - sb < -128);
      flags.n = r[7];
      flags.z = (r == 0);
      for (int cnd = 0; cnd < 16; cnd++) begin
        case (cnd)
          0: exp = a >= b;   1: exp = a < b;
          2: exp = flags.o;  3: exp = !flags.o;
          4: exp = r[7];     5: exp = !r[7];
          6: exp = a == b;   7: exp = a != b;
          8: exp = a > b;    9: exp = a <= b;
          10: exp = sa > sb; 11: exp = sa >= sb;
          12: exp = sa < sb; 13: exp = sa <= sb;
          default: exp = 1;
        endcase
        opcode = {4'hF, 4'(cnd)};
        #1;
        checks++;
        if (ctrl.c2_branch !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL branch %h a %h b %h", opcode, a, b);
        end
      end
    end

    // write enables per group
    flags = '0;
    for (int op = 0; op < 256; op++) begin
      bit w, f;
      opcode = 8'(op);
      #1;
      case (op >> 4)
        2, 4, 6, 9, 14:  begin w = 1; f = (op >> 4) != 2 && (op >> 4) != 9; end
        3, 5, 7, 8:      begin w = (op % 4) == 0; f = w && ((op >> 4) == 5 || (op >> 4) == 7); end
        12:              begin w = (op % 4) < 2; f = w; end
        13:              begin w = 0; f = 1; end
        default:         begin w = 0; f = 0; end
      endcase
      checks++;
      if (ctrl.c10_reg_we !== w || ctrl.c14_flags_we !== f) begin
        failures++;
        $display("FAIL enables opcode %h: C10 %b C14 %b", opcode, ctrl.c10_reg_we, ctrl.c14_flags_we);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
