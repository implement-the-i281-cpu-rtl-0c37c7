// tb_i281e_cpu: end-to-end test of the i281e CPU at its default sizes.
//
// The CPU boots the self-check program in the boot ROM. An instruction-level
// model of the i281e instruction set, written separately from the RTL, runs
// the same program from the same ROM image and the same switch settings. Before
// every instruction the testbench compares PC, registers, flags, bank and CACHE
// with the model, and at the end compares data memory against the model and
// against hand-worked results. The clock is first single-stepped, then run at
// one instruction per four oscillator cycles, then at one per cycle; the test
// checks that each mode gives exactly that rate. It counts how often each
// mechanism happens (every opcode group, branches taken and not taken, bank
// switching, running from code RAM, code writes from switches and from CACHE,
// data reads and writes, flag writes, stepping) and fails any that never does.
`timescale 1ns/1ps
module tb_i281e_cpu;
  import i281e_pkg::*;

  localparam logic [15:0] SW = 16'h5802;   // doubles as ADDI C,2 and input byte 0x02
  localparam int DONE_PC = 91;

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0, step = 1'b0;
  logic [3:0] div_sel = 4'd0;
  logic [15:0] switches = SW;
  debug_t dbg;

  i281e_cpu dut (.clk, .rst_n, .switches, .run, .step, .div_sel, .dbg);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- instruction-level reference model ----------------
  logic [15:0] m_rom [128];
  logic [15:0] m_cram [int];
  logic [7:0]  m_dram [int];
  logic [7:0]  m_pc, m_bank, m_cache;
  logic [7:0]  m_r [4];
  logic        m_c, m_o, m_n, m_z;

  // mechanism counters
  int n_group [16];
  int n_taken, n_not_taken, n_bank, n_ram_exec, n_cw_sw, n_cw_cache, n_dw, n_dr, n_fw;
  int n_steps, n_instr;

  function automatic logic [15:0] m_fetch(logic [7:0] a);
    if (!a[7]) return m_rom[a[6:0]];
    return m_cram.exists(int'({m_bank, a[6:0]})) ? m_cram[int'({m_bank, a[6:0]})] : 16'h0000;
  endfunction

  function automatic void m_cwrite(logic [7:0] a, logic [15:0] d);
    if (a[7]) m_cram[int'({m_bank, a[6:0]})] = d;
  endfunction

  function automatic void m_dwrite(logic [7:0] a, logic [7:0] d);
    m_dram[int'({m_bank, a[6:0]})] = d;
    n_dw++;
  endfunction

  function automatic logic [7:0] m_dread(logic [7:0] a);
    n_dr++;
    return m_dram.exists(int'({m_bank, a[6:0]})) ? m_dram[int'({m_bank, a[6:0]})] : 8'h00;
  endfunction

  // arithmetic with flags: kind 0 add, 1 sub, 2 nor, 3 shift right
  function automatic logic [7:0] m_alu(int kind, logic [7:0] a, logic [7:0] b);
    logic [8:0] w;
    logic [7:0] r;
    case (kind)
      0: begin w = a + b; r = w[7:0]; m_c = w[8]; m_o = (a[7] == b[7]) && (r[7] != a[7]); end
      1: begin r = a - b; m_c = (a >= b); m_o = (a[7] != b[7]) && (r[7] != a[7]); end
      2: begin r = ~(a | b); m_c = 0; m_o = 0; end
      default: begin r = a >> 1; m_c = a[0]; m_o = 0; end
    endcase
    m_n = r[7];
    m_z = (r == 0);
    n_fw++;
    return r;
  endfunction

  function automatic void m_step();
    logic [15:0] ins;
    logic [7:0] op, imm, nxt, t;
    logic [1:0] x, y;
    bit take;
    ins = m_fetch(m_pc);
    op = ins[15:8]; imm = ins[7:0]; x = op[3:2]; y = op[1:0];
    nxt = m_pc + 8'd1;
    n_group[op[7:4]]++;
    if (m_pc[7]) n_ram_exec++;
    case (op[7:4])
      4'h0: if (y == 0) begin m_bank = m_r[x] + imm; n_bank++; end
      4'h1: case (op[3:0])
        4'h0: begin m_cwrite(imm, switches); n_cw_sw++; end
        4'h2: m_dwrite(imm, switches[7:0]);
        4'h1, 4'h5, 4'h9, 4'hD: begin m_cwrite(m_r[x] + imm, switches); n_cw_sw++; end
        4'h3, 4'h7, 4'hB, 4'hF: m_dwrite(m_r[x] + imm, switches[7:0]);
        4'h4: m_cache = m_r[0];
        4'h6, 4'hA, 4'hE: begin m_cwrite(m_r[x] + imm, {m_cache, m_r[0]}); n_cw_cache++; end
        default: ;
      endcase
      4'h2: m_r[x] = m_r[y] + imm;
      4'h3: if (y == 0) m_r[x] = imm;
      4'h4: m_r[x] = m_alu(0, m_r[x], m_r[y]);
      4'h5: if (y == 0) m_r[x] = m_alu(0, m_r[x], imm);
      4'h6: m_r[x] = m_alu(1, m_r[x], m_r[y]);
      4'h7: if (y == 0) m_r[x] = m_alu(1, m_r[x], imm);
      4'h8: if (y == 0) m_r[x] = m_dread(imm);
      4'h9: m_r[x] = m_dread(m_r[y] + imm);
      4'hA: if (y == 0) m_dwrite(imm, m_r[x]);
      4'hB: m_dwrite(m_r[y] + imm, m_r[x]);
      4'hC: if (y == 0) m_r[x] = m_alu(2, m_r[x], imm);
            else if (y == 1) m_r[x] = m_alu(3, m_r[x], 8'h00);
      4'hD: t = m_alu(1, m_r[x], m_r[y]);
      4'hE: m_r[x] = m_alu(2, m_r[x], m_r[y]);
      4'hF: begin
        case (op[3:0])
          0: take = m_c;        1: take = !m_c;
          2: take = m_o;        3: take = !m_o;
          4: take = m_n;        5: take = !m_n;
          6: take = m_z;        7: take = !m_z;
          8: take = m_c & !m_z; 9: take = !m_c | m_z;
          10: take = !m_z & (m_n ~^ m_o);  11: take = m_n ~^ m_o;
          12: take = m_n ^ m_o;            13: take = m_z | (m_n ^ m_o);
          default: take = 1;
        endcase
        if (take) begin
          nxt = nxt + ((op[3:0] == 4'hE) ? m_r[2] + imm : imm);
          n_taken++;
        end else n_not_taken++;
      end
      default: ;
    endcase
    m_pc = nxt;
    n_instr++;
  endfunction

  // ---------------- lock-step comparison ----------------
  int last_en_cycle = -1, cycle = 0, gap_err = 0;
  int expect_gap = 0;
  bit stepping = 1'b1;
  always @(negedge clk) begin
    cycle++;
    if (rst_n && dut.en) begin
      check(dbg.pc == m_pc, $sformatf("pc %h model %h", dbg.pc, m_pc));
      check(dbg.reg_a == m_r[0] && dbg.reg_b == m_r[1] && dbg.reg_c == m_r[2] && dbg.reg_d == m_r[3],
            $sformatf("regs at pc %h: %h %h %h %h model %h %h %h %h", m_pc, dbg.reg_a, dbg.reg_b,
                      dbg.reg_c, dbg.reg_d, m_r[0], m_r[1], m_r[2], m_r[3]));
      check(dbg.flags == {m_c, m_o, m_n, m_z}, $sformatf("flags at pc %h", m_pc));
      check(dbg.bank == m_bank && dbg.cache == m_cache, $sformatf("bank/cache at pc %h", m_pc));
      if (expect_gap != 0 && last_en_cycle >= 0)
        check(cycle - last_en_cycle == expect_gap,
              $sformatf("instruction period %0d, expected %0d", cycle - last_en_cycle, expect_gap));
      last_en_cycle = cycle;
      if (stepping) n_steps++;
      m_step();
    end
  end

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] dval;
  initial begin
    $readmemh("rtl/i281e_bios.hex", m_rom);
    foreach (m_rom[i]) if ($isunknown(m_rom[i])) m_rom[i] = 16'h0000;
    m_pc = 0; m_bank = 0; m_cache = 0; m_r = '{default: 0};
    {m_c, m_o, m_n, m_z} = 4'b0000;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // single-step five instructions
    repeat (5) begin
      repeat (6) @(posedge clk);
      step = 1'b1;
      repeat (6) @(posedge clk);
      step = 1'b0;
    end
    check(n_instr == 5, $sformatf("single step executed %0d instructions, expected 5", n_instr));
    // run at oscillator / 4
    @(negedge clk);
    stepping = 1'b0;
    div_sel = 4'd2; run = 1'b1;
    wait (n_instr == 8);
    expect_gap = 4;
    wait (n_instr == 30);
    // run at full oscillator rate: one instruction per clock
    @(negedge clk);
    expect_gap = 0; div_sel = 4'd0;
    wait (n_instr == 33);
    expect_gap = 1;
    wait (m_pc == 8'(DONE_PC));
    repeat (10) @(posedge clk);
    @(negedge clk);
    run = 1'b0;
    repeat (5) @(posedge clk);

    // data memory against the model
    foreach (m_dram[a]) begin
      dval = dut.u_dmem.ram[15'(a)];
      check(dval == m_dram[a], $sformatf("data[%h] = %h, model %h", a, dval, m_dram[a]));
    end
    // hand-worked results of the self-check program (bank 0 unless noted)
    check(dut.u_dmem.ram[15'h007F] == 8'hA5, "signature");
    check(dut.u_dmem.ram[15'h0000] == 8'hFE, "5+3-10");
    check(dut.u_dmem.ram[15'h0001] == 8'h7C, "NOR");
    check(dut.u_dmem.ram[15'h0002] == 8'h80, "SHIFTR/NORI");
    check(dut.u_dmem.ram[15'h0003] == 8'h37, "loop sum 1..10");
    check(dut.u_dmem.ram[15'h0004] == 8'hCB, "INPUTDF/SUB");
    check(dut.u_dmem.ram[15'h0005] == 8'hFE, "STOREF");
    check(dut.u_dmem.ram[15'h0087] == 8'h81, "code RAM ADDI B (bank 1)");
    check(dut.u_dmem.ram[15'h0088] == 8'h04, "code RAM from switches (bank 1)");
    check(dut.u_dmem.ram[15'h0009] == 8'h37, "bank 0 data");
    check(dut.u_dmem.ram[15'h0086] == 8'h33, "bank 1 data");
    check(dut.u_dmem.ram[15'h000A] == 8'h37, "JUMPR skip");
    check(dut.u_dmem.ram[15'h0010] == 8'h02 && dut.u_dmem.ram[15'h0011] == 8'h02, "INPUTD");
    check(dut.u_cmem.ram[15'h0080] == 16'h5401, "WRITE via CACHE");

    // every mechanism must have happened
    for (int g = 0; g < 16; g++) check(n_group[g] > 0, $sformatf("opcode group %h never executed", g));
    check(n_taken > 0,     "no branch taken");
    check(n_not_taken > 0, "no branch not taken");
    check(n_bank >= 2,     "bank switch");
    check(n_ram_exec > 0,  "execution from code RAM");
    check(n_cw_sw >= 2,    "code write from switches");
    check(n_cw_cache >= 2, "code write from CACHE");
    check(n_dw > 0 && n_dr > 0, "data memory access");
    check(n_fw > 0,        "flag write");
    check(n_steps == 5,    "single steps");
    $display("mechanisms: instr=%0d taken=%0d not_taken=%0d bank=%0d ram_exec=%0d cw_sw=%0d cw_cache=%0d dw=%0d dr=%0d fw=%0d steps=%0d",
             n_instr, n_taken, n_not_taken, n_bank, n_ram_exec, n_cw_sw, n_cw_cache, n_dw, n_dr, n_fw, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
