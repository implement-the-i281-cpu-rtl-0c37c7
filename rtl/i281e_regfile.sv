// i281e_regfile: the four 8-bit general registers A, B, C, D.
//
// Two combinational read ports (port 0 selected by C4,C5 and port 1 by C6,C7)
// and one write port (register chosen by C8,C9, written on the clock edge when
// the CPU clock enable and C10 are high). Reset clears all registers; the
// reset is this implementation's addition. Port 0 feeds ALU input A; port 1
// feeds the C11 mux (ALU input B) and the C16 mux (data-memory input).
module i281e_regfile
  import i281e_pkg::*;
#(
  parameter int unsigned NREGS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [$clog2(NREGS)-1:0] rp0,
  input  logic [$clog2(NREGS)-1:0] rp1,
  input  logic [$clog2(NREGS)-1:0] wp,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] port0,
  output logic [7:0] port1,
  output logic [7:0] regs [NREGS]
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        regs <= '{default: '0};
    else if (en && we) regs[wp] <= wdata;

  always_comb begin
    port0 = regs[rp0];
    port1 = regs[rp1];
  end
endmodule
