// i281e_clock: adjustable CPU clock of the i281e, as a clock enable.
//
// The board runs from a 1.8432 MHz oscillator (clk). In run mode the module
// issues one cpu_en pulse every DIV(div_sel) oscillator cycles, with
// DIV = 2**div_sel for div_sel 0..14 (1.8432 MHz down to 112.5 Hz) and
// DIV = OSC_HZ for div_sel 15 (1 Hz). With run low the CPU stops and each press
// of the step button (synchronised with two flip-flops, rising edge detected)
// gives exactly one cpu_en pulse, executing one instruction. The oscillator
// frequency, the 1 Hz lower limit and single stepping follow the design; the
// divider table and the use of a clock enable instead of a divided clock are
// this implementation's. cpu_en is registered.
module i281e_clock #(
  parameter int unsigned OSC_HZ = 1843200
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       run,
  input  logic       step,
  input  logic [3:0] div_sel,
  output logic       cpu_en
);
  localparam int unsigned CW = $clog2(OSC_HZ + 1);

  logic [CW-1:0] count, div;
  logic [2:0]    step_sync;

  always_comb div = (div_sel == 4'd15) ? CW'(OSC_HZ) : CW'(1) << div_sel;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      count     <= '0;
      step_sync <= '0;
      cpu_en    <= 1'b0;
    end else begin
      step_sync <= {step_sync[1:0], step};
      if (run) begin
        if (count >= div - 1'b1) begin
          count  <= '0;
          cpu_en <= 1'b1;
        end else begin
          count  <= count + 1'b1;
          cpu_en <= 1'b0;
        end
      end else begin
        count  <= '0;
        cpu_en <= step_sync[1] && !step_sync[2];
      end
    end
endmodule
