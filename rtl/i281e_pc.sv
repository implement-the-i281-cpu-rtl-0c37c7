// i281e_pc: program counter of the i281e.
//
// An 8-bit PC register, an incrementer (PC + 1) and a branch adder
// (PC + 1 + offset, offset being the C15 mux output read as a two's-complement
// byte). C2 (BRANCH) selects the branch target as the next PC; otherwise the
// PC steps by one. The PC loads next_pc on each clock edge with the CPU clock
// enable high, so every instruction takes exactly one CPU clock. Reset sets
// the PC to 0, the first word of the boot ROM. The relative target matches the
// design's example: JUMP with operand 0x0B at PC 0x00 gives NEXT 0x0C. The
// 8-bit width (128 ROM words plus a 128-word RAM bank window) is this
// implementation's reading of the banked memory.
module i281e_pc (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic       branch,
  input  logic [7:0] offset,
  output logic [7:0] pc,
  output logic [7:0] next_pc
);
  logic [7:0] pc_plus1, target;

  always_comb begin
    pc_plus1 = pc + 8'd1;
    target   = pc_plus1 + offset;
  end

  i281e_mux2 #(.WIDTH(8)) u_c2_mux (.sel(branch), .in0(pc_plus1), .in1(target), .out(next_pc));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  pc <= '0;
    else if (en) pc <= next_pc;
endmodule
