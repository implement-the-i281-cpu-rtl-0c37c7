// tb_i281e_loader: the CPU loads a user program by itself and runs it.
//
// The boot ROM image tb/tb_i281e_loader_bios.hex is a 13-word loader. It reads
// a byte stream through the switches with INPUTD. The first byte is the word
// count; after it come the high and low bytes of each word. The loader puts the
// high byte in CACHE, writes {CACHE, low byte} into code RAM from 0x80 up with
// WRITE, and jumps to 0x80. The testbench plays the role of the byte source: it
// puts the next byte on the switches each time an INPUTD executes.
//
// The user program is a bubble sort of eight signed bytes, a typical example
// program for this CPU: it stores the array at data 0x10-0x17, sorts it in
// place in ascending signed order and stores 0xA5 at 0x7F. The testbench checks
// that code RAM holds the program, that the array equals the same values sorted
// here, and that the CPU ran one instruction per clock throughout.
`timescale 1ns/1ps
module tb_i281e_loader;
  import i281e_pkg::*;

  localparam int N = 33;
  localparam logic [15:0] PROG [N] = '{
    16'h3005, 16'ha010, 16'h30fd, 16'ha011, 16'h307f, 16'ha012, 16'h3000, 16'ha013,
    16'h3080, 16'ha014, 16'h300c, 16'ha015, 16'h300c, 16'ha016, 16'h3001, 16'ha017,
    16'h3c07, 16'h3400, 16'h9110, 16'h9911, 16'hd200, 16'hfd02, 16'hb910, 16'hb111,
    16'h5401, 16'h3007, 16'hd400, 16'hfcf6, 16'h7c01, 16'hf7f3, 16'h30a5, 16'ha07f,
    16'hffff};
  // the array the program stores: 5, -3, 127, 0, -128, 12, 12, 1
  localparam logic [7:0] VALS [8] = '{8'd5, 8'hFD, 8'h7F, 8'h00, 8'h80, 8'd12, 8'd12, 8'd1};

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, step = 1'b0;
  logic [3:0] div_sel = 4'd0;
  logic [15:0] switches;
  debug_t dbg;

  i281e_cpu #(.BIOS_FILE("tb/tb_i281e_loader_bios.hex")) dut (
    .clk, .rst_n, .switches, .run, .step, .div_sel, .dbg
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // byte stream: count, then high and low byte of each word
  logic [7:0] stream [1 + 2 * N];
  int sp = 0, n_input = 0, n_instr = 0, n_cycles = 0, n_ram = 0;
  initial begin
    stream[0] = 8'(N);
    for (int i = 0; i < N; i++) begin
      stream[1 + 2 * i] = PROG[i][15:8];
      stream[2 + 2 * i] = PROG[i][7:0];
    end
  end
  assign switches = {8'h00, stream[sp]};

  always @(negedge clk) if (rst_n && run) begin
    n_cycles++;
    if (dut.en) begin
      n_instr++;
      if (dbg.pc[7]) n_ram++;
      if (dbg.instruction[15:8] == 8'h12) begin
        n_input++;
        @(posedge clk);
        #1 if (sp < 2 * N) sp++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] sorted [8];
    logic [7:0] t;
    sorted = VALS;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 7 - i; j++)
        if ($signed(sorted[j]) > $signed(sorted[j + 1])) begin
          t = sorted[j]; sorted[j] = sorted[j + 1]; sorted[j + 1] = t;
        end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) run = 1'b1;
    wait (dut.u_dmem.ram[15'h007F] == 8'hA5 && dbg.pc == 8'h80 + 8'(N - 1));
    repeat (4) @(posedge clk);
    check(n_input == 1 + 2 * N, $sformatf("%0d bytes read, expected %0d", n_input, 1 + 2 * N));
    for (int i = 0; i < N; i++)
      check(dut.u_cmem.ram[15'(i)] == PROG[i],   // bank 0, code address 0x80 + i
            $sformatf("code RAM word %0d", i));
    for (int i = 0; i < 8; i++)
      check(dut.u_dmem.ram[15'h0010 + 15'(i)] == sorted[i],
            $sformatf("sorted[%0d] = %h, expected %h", i, dut.u_dmem.ram[15'h0010 + 15'(i)], sorted[i]));
    check(n_ram > 100, "program ran from code RAM");
    check(n_instr == n_cycles, $sformatf("%0d instructions in %0d cycles", n_instr, n_cycles));
    $display("loader+sort: %0d instructions, %0d from code RAM, %0d cycles", n_instr, n_ram, n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
