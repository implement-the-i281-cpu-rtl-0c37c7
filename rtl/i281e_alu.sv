// i281e_alu: 8-bit ALU of the i281e (NOR version).
//
// Four operations, chosen by sel = {ALU_SELECT_1, ALU_SELECT_0} = {C12, C13}:
//   00  NOR   result = ~(a | b)          carry = 0, overflow = 0
//   01  SHR   result = a >> 1 (logical)  carry = a[0] (bit shifted out), overflow = 0
//   10  ADD   result = a + b             carry = carry out, overflow = signed overflow
//   11  SUB   result = a - b = a + ~b + 1 carry = carry out (1 = no borrow), overflow
// As in the design's schematic, a NOR stage feeds the shifter, which either
// passes it or shifts a right; the adder/subtractor runs beside it, and the
// ALU_SELECT_1 bit picks the shifter or adder output, the carry source and
// whether overflow is the adder's or ground. Negative and zero come from a flag
// calculator on the result. Logical (zero-fill) right shift and carry = 0 for
// NOR are this implementation's choices. Purely combinational.
module i281e_alu
  import i281e_pkg::*;
(
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  alu_op_e    sel,
  output logic [7:0] result,
  output flags_t     flags
);
  logic [7:0] nor_out, shift_out, sum;
  logic       shift_bit, add_carry, add_ovf;
  logic [7:0] b_eff;

  always_comb begin
    // NOR stage and shifter (ALU_SELECT_0 = 1 selects the right shift)
    nor_out   = ~(a | b);
    shift_out = sel[0] ? {1'b0, a[7:1]} : nor_out;
    shift_bit = sel[0] ? a[0] : 1'b0;
    // adder/subtractor (ALU_SELECT_0 = 1 subtracts)
    b_eff                = sel[0] ? ~b : b;
    {add_carry, sum}     = {1'b0, a} + {1'b0, b_eff} + 9'(sel[0]);
    add_ovf              = (a[7] == b_eff[7]) && (sum[7] != a[7]);
    // output multiplexers (ALU_SELECT_1)
    result  = sel[1] ? sum : shift_out;
    flags.c = sel[1] ? add_carry : shift_bit;
    flags.o = sel[1] ? add_ovf : 1'b0;
    // flag calculator
    flags.n = result[7];
    flags.z = (result == 8'h00);
  end
endmodule
