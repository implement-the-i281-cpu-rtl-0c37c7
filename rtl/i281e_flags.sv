// i281e_flags: the i281e condition-flag register (C, O, N, Z).
//
// Loads the ALU flags on a clock edge when the CPU clock enable is high and
// C14 (WFLAGS) is set; otherwise holds. Cleared by the active-low reset (the
// reset is this implementation's addition; the design shows the register
// starting at 0000). The branch conditions in the control table read q.
module i281e_flags
  import i281e_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   we,
  input  flags_t d,
  output flags_t q
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)        q <= '0;
    else if (en && we) q <= d;
endmodule
