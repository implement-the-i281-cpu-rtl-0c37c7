// tb_i281e_mux2: random check of the 8-bit two-to-one multiplexer.
`timescale 1ns/1ps
module tb_i281e_mux2;
  logic       sel;
  logic [7:0] in0, in1, out;
  int checks = 0, failures = 0;

  i281e_mux2 #(.WIDTH(8)) dut (.sel, .in0, .in1, .out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      sel = 1'($urandom); in0 = 8'($urandom); in1 = 8'($urandom);
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
