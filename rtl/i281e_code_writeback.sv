// i281e_code_writeback: builds the word that the i281e writes into code memory.
//
// Two sources: the sixteen front-panel switches (INPUTC, INPUTCF: C3 = 0), or
// the CACHE byte as the high half and the data-memory input bus (the C16 mux
// output, i.e. a register) as the low half (WRITE: C3 = 1). CACHE is an 8-bit
// register loaded from the same bus by the CACHE instruction, recognised here
// as C3 set without C1. 'out' is combinational; CACHE changes on the enabled
// clock edge and resets to 0. The CACHE register, the switch source and the
// C3 (PRGM) signal follow the design; using C3 both as source select and,
// without C1, as CACHE load is this implementation's choice.
module i281e_code_writeback (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        prgm,
  input  logic        code_we,
  input  logic [15:0] switches,
  input  logic [7:0]  data,
  output logic [15:0] out,
  output logic [7:0]  cache
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                       cache <= '0;
    else if (en && prgm && !code_we)  cache <= data;

  always_comb out = prgm ? {cache, data} : switches;
endmodule
