// i281e_data_memory: banked data RAM of the i281e.
//
// BANKS x BANK_BYTES bytes (32 KB at the defaults). The 8-bit address from the
// C15 mux selects a byte within the bank chosen by the shared bank register:
// RAM address = {bank, addr[6:0]}; address bit 7 is not decoded, so the upper
// half of the address range mirrors the lower. Read is combinational (the
// design's single-cycle LOAD needs the byte within the same clock); C17
// writes wdata (the C16 mux output) on the enabled clock edge. The size and
// bank count follow the design; the address split is this implementation's
// choice. The RAM is not reset.
module i281e_data_memory #(
  parameter int unsigned BANKS      = 256,
  parameter int unsigned BANK_BYTES = 128
) (
  input  logic       clk,
  input  logic       en,
  input  logic [7:0] addr,
  input  logic [7:0] bank,
  input  logic       we,
  input  logic [7:0] wdata,
  output logic [7:0] rdata
);
  localparam int unsigned BW = $clog2(BANKS);
  localparam int unsigned OW = $clog2(BANK_BYTES);

  logic [7:0] ram [BANKS*BANK_BYTES];
  logic [BW+OW-1:0] a;

  always_comb begin
    a     = {bank[BW-1:0], addr[OW-1:0]};
    rdata = ram[a];
  end

  always_ff @(posedge clk)
    if (en && we) ram[a] <= wdata;
endmodule
