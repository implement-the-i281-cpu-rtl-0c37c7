// i281e_mux2: WIDTH-bit two-to-one multiplexer.
//
// The i281e data path uses one of these for each of the C11 (ALU input B),
// C15 (ALU result or immediate: data-memory address), C16 (register or
// switches: data-memory input) and C18 (C15 output or data-memory output:
// register input) selections. out = sel ? in1 : in0, purely combinational.
// The 8-bit width is the design's; the WIDTH parameter is added for reuse.
module i281e_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);
  always_comb out = sel ? in1 : in0;
endmodule
