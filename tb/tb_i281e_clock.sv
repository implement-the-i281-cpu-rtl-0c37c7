// tb_i281e_clock: in run mode cpu_en pulses once every 2**div_sel cycles
// (div_sel 0..6 measured) and every 1,843,200 cycles at div_sel 15 (1 Hz);
// in step mode each button press, however long, gives exactly one pulse.
`timescale 1ns/1ps
module tb_i281e_clock;
  logic clk = 0, rst_n = 0, run = 0, step = 0, cpu_en;
  logic [3:0] div_sel = 0;
  int checks = 0, failures = 0;

  i281e_clock dut (.clk, .rst_n, .run, .step, .div_sel, .cpu_en);
  always #5 clk = ~clk;

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int sel, input int expect_period);
    int t0, t1, n;
    @(negedge clk);
    run = 1; div_sel = 4'(sel);
    // skip the first pulse after a change, then time two gaps
    n = 0;
    do begin @(posedge clk); #1; end while (!cpu_en);
    for (int g = 0; g < 2; g++) begin
      n = 0;
      do begin @(posedge clk); #1; n++; end while (!cpu_en);
      checks++;
      if (n != expect_period) begin
        failures++; $display("FAIL div_sel %0d period %0d expected %0d", sel, n, expect_period);
      end
    end
  endtask

  initial begin
    int pulses;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int s = 0; s <= 6; s++) measure(s, 1 << s);
    measure(15, 1843200);
    // step mode
    @(negedge clk) run = 0;
    repeat (5) @(posedge clk);
    pulses = 0;
    fork
      begin
        for (int p = 0; p < 7; p++) begin
          repeat (3 + p) @(negedge clk);
          step = 1;
          repeat (2 + 3 * p) @(negedge clk);
          step = 0;
        end
        repeat (10) @(negedge clk);
      end
      forever begin @(posedge clk); #1; if (cpu_en) pulses++; end
    join_any
    disable fork;
    checks++;
    if (pulses != 7) begin failures++; $display("FAIL %0d step pulses, expected 7", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
