// tb_i281e_alu: exhaustive check of the i281e ALU.
//
// For all 65,536 operand pairs and all four operations it compares result and
// the C, O, N, Z flags with values computed here from the operation's
// definition (wide integer arithmetic for add and subtract, signed-range test
// for overflow, a >= b for the subtract carry).
`timescale 1ns/1ps
module tb_i281e_alu;
  import i281e_pkg::*;
  logic [7:0] a, b, result;
  alu_op_e    sel;
  flags_t     flags;
  int checks = 0, failures = 0;

  i281e_alu dut (.a, .b, .sel, .result, .flags);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, wide;
    logic [7:0] er;
    logic ec, eo;
    for (int op = 0; op < 4; op++)
      for (int i = 0; i < 256; i++)
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); sel = alu_op_e'(op);
          #1;
          sa = $signed(a); sb = $signed(b);
          case (op)
            0: begin er = ~(a | b); ec = 0; eo = 0; end
            1: begin er = a / 2; ec = a % 2; eo = 0; end
            2: begin wide = i + j; er = 8'(wide); ec = wide > 255;
                     eo = (sa + sb > 127) || (sa + sb < -128); end
            default: begin er = 8'(i - j); ec = i >= j;
                     eo = (sa - sb > 127) || (sa - sb < -128); end
          endcase
          checks++;
          if (result !== er || flags !== {ec, eo, er[7], er == 0}) begin
            failures++;
            if (failures < 10) $display("FAIL op %0d a %h b %h: %h %b", op, a, b, result, flags);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
