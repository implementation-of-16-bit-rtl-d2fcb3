// cpu_tb: end-to-end test of the CPU against an instruction-level model.
//
// Runs a directed program (a counting loop with a backward branch, every
// flag set and cleared, memory reads and writes) and then many random
// programs through the CPU connected to a behavioural memory, and through the
// reference model in tb_isa_pkg. Random programs only branch and jump
// forward, so they always reach HLT; indirect loads and stores get their
// address from an LDI just before them, inside a data area that holds no code.
// After each program it compares the eight registers, the PSW, the data area
// and the number of clock cycles to reach HLT. The memory's wait states vary
// from program to program.
// Mechanisms counted (each must occur): memory wait states, memory reads and
// writes, taken and not-taken branches, backward branches, each opcode,
// carry, overflow and half-carry results, every bus driver.
module cpu_tb;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  localparam int NPROG   = 300;
  localparam int DATA_LO = 'h80, DATA_HI = 'hff;

  logic        clk = 0, rst = 1;
  logic        ready, data_oe, vma, rw, halted;
  logic [15:0] data_in, data_out, addr, dbg_pc, dbg_ir, dbg_bus;
  logic [15:0] dbg_opreg, dbg_outreg, dbg_shftreg;
  psw_t        dbg_psw;
  logic [3:0]  wait_cycles = 0;

  int checks = 0, failures = 0;
  longint cyc_total = 0;
  int n_wait = 0, n_rd = 0, n_wr = 0, n_taken = 0, n_not_taken = 0, n_back = 0;
  int n_carry = 0, n_ovf = 0, n_half = 0;
  int n_drv [6];
  int n_op [32];

  cpu dut (.*);

  mem_model #(.AW(16)) u_mem (
    .clk, .vma, .rw, .addr, .wdata(data_out), .wait_cycles, .ready, .rdata(data_in)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Observe mechanisms inside the running CPU.
  always @(posedge clk) if (!rst) begin
    ctrl_t c;
    c = dut.u_ctrl.ctrl;
    if (vma && !ready) n_wait++;
    if (vma && ready && !rw) n_rd++;
    if (vma && ready && rw) n_wr++;
    if (c.reg_en)  n_drv[0]++;
    if (c.out_en)  n_drv[1]++;
    if (c.shft_en) n_drv[2]++;
    if (c.pc_en)   n_drv[3]++;
    if (c.imm_en)  n_drv[4]++;
    if (c.mem_en)  n_drv[5]++;
    if (c.imm_en && c.alu_sel == ALU_ADD && c.imm[15]) n_back++;
    if (c.out_ld && c.alu_sel != ALU_INC && dut.u_alu.flags.c) n_carry++;
    if (c.out_ld && c.alu_sel != ALU_INC && dut.u_alu.flags.o) n_ovf++;
    if (c.out_ld && c.alu_sel != ALU_INC && dut.u_alu.flags.h) n_half++;
    checks++;
    if (data_oe !== (vma && rw)) begin
      failures++;
      $display("FAIL data_oe=%b while vma=%b rw=%b", data_oe, vma, rw);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Load a program into both memories, run both, compare.
  task automatic run_and_compare(isa_model m, int w, string name);
    longint cyc = 0;
    int steps = 0;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = m.mem[i];
    m.wait_cycles = w;
    wait_cycles = 4'(w);
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (!halted && cyc < 200000) begin
      @(posedge clk);
      cyc++;
      #1;
    end
    while (!m.halted && steps < 100000) begin m.step(); steps++; end
    cyc_total += cyc;
    foreach (m.n_exec[i]) n_op[i] += m.n_exec[i];
    n_taken += m.n_taken;
    n_not_taken += m.n_not_taken;
    check(halted && m.halted, $sformatf("%s: halt dut=%b model=%b", name, halted, m.halted));
    for (int i = 0; i < 8; i++)
      check(dut.u_regs.regs[i] === m.r[i],
            $sformatf("%s: R%0d=%h expected %h", name, i, dut.u_regs.regs[i], m.r[i]));
    check(dbg_psw === m.psw, $sformatf("%s: psw=%b expected %b", name, dbg_psw, m.psw));
    check(dbg_pc === m.pc, $sformatf("%s: pc=%h expected %h", name, dbg_pc, m.pc));
    for (int a = DATA_LO; a <= DATA_HI; a++)
      check(u_mem.mem[a] === m.mem[a],
            $sformatf("%s: mem[%h]=%h expected %h", name, a, u_mem.mem[a], m.mem[a]));
    check(cyc == m.cycles, $sformatf("%s: %0d cycles, expected %0d", name, cyc, m.cycles));
  endtask

  function automatic void fill_data(isa_model m);
    for (int a = 0; a < 65536; a++) m.mem[a] = '0;
    for (int a = DATA_LO; a <= DATA_HI; a++) m.mem[a] = 16'($urandom);
  endfunction

  // Directed program: loop five times adding 3, exercising the flags.
  task automatic directed();
    isa_model m = new();
    int p = 0;
    fill_data(m);
    m.mem[p++] = enc_rk(OP_LDI, 1, 5);
    m.mem[p++] = enc_rk(OP_LDI, 2, 0);
    m.mem[p++] = enc_rk(OP_ADDI, 2, 3);          // loop:
    m.mem[p++] = enc_rk(OP_SUBI, 1, 1);
    m.mem[p++] = enc_rr(OP_CMP, 1, 0, CMP_NEQ);  // Z = (R1 != 0)
    m.mem[p++] = enc_rk(OP_BRZ, 0, -4);          // back to loop
    m.mem[p++] = enc_rk(OP_STD, 2, 16'h90);      // [0x90] = 15
    m.mem[p++] = enc_rk(OP_LDI, 3, 8'hff);
    m.mem[p++] = enc_rk(OP_SHL, 3, 0);
    m.mem[p++] = enc_rk(OP_NOT, 3, 0);           // 0xfe01
    m.mem[p++] = enc_rr(OP_ADD, 3, 3);           // carry, overflow
    m.mem[p++] = enc_rk(OP_BRC, 0, 1);           // taken, skips the HLT
    m.mem[p++] = enc_rk(OP_HLT, 0, 0);
    m.mem[p++] = enc_rk(OP_SET, 0, FLAG_H);
    m.mem[p++] = enc_rk(OP_BRH, 0, 1);
    m.mem[p++] = enc_rk(OP_HLT, 0, 0);
    m.mem[p++] = enc_rk(OP_CLR, 0, FLAG_H);
    m.mem[p++] = enc_rk(OP_LDD, 4, 16'h90);
    m.mem[p++] = enc_rk(OP_LDI, 5, 16'h91);
    m.mem[p++] = enc_rr(OP_STX, 5, 4);           // [0x91] = 15
    m.mem[p++] = enc_rk(OP_LDP, 6, 0);
    m.mem[p++] = enc_rk(OP_ADDI, 6, 2);
    m.mem[p++] = enc_rk(OP_JMR, 6, 0);           // skips the HLT
    m.mem[p++] = enc_rk(OP_HLT, 0, 0);
    m.mem[p++] = enc_rk(OP_HLT, 0, 0);
    run_and_compare(m, 1, "directed");
    check(dut.u_regs.regs[2] === 16'd15 && u_mem.mem[16'h91] === 16'd15,
          $sformatf("directed: R2=%0d [91]=%0d, expected 15 and 15",
                    dut.u_regs.regs[2], u_mem.mem[16'h91]));
  endtask

  // Random forward-only program of about n instructions.
  task automatic random_prog(int n, int idx);
    isa_model m = new();
    int p = 0, kind, rd, rs, x, t;
    bit second [256];   // second word of an LDI pair: no jump may land there
    foreach (second[i]) second[i] = 0;
    fill_data(m);
    // Give the registers random starting values.
    for (int i = 0; i < 8; i++) m.mem[p++] = enc_rk(OP_LDI, i, $urandom);
    while (p < n) begin
      rd = $urandom_range(0, 7); rs = $urandom_range(0, 7);
      kind = $urandom_range(0, 15);
      case (kind)
        0, 1, 2: m.mem[p++] = enc_rr(opcode_e'($urandom_range(OP_MOV, OP_SBC)), rd, rs);
        3:       m.mem[p++] = enc_rk(($urandom_range(0, 1)) ? OP_ADDI : OP_SUBI, rd, $urandom);
        4:       m.mem[p++] = enc_rr(opcode_e'($urandom_range(OP_AND, OP_XOR)), rd, rs);
        5:       m.mem[p++] = enc_rr(opcode_e'($urandom_range(OP_NOT, OP_ROR)), rd, 0);
        6:       m.mem[p++] = enc_rk(($urandom_range(0, 1)) ? OP_LDI : OP_LDP, rd, $urandom);
        7:       m.mem[p++] = enc_rr(OP_CMP, rd, rs, $urandom_range(0, 7));
        8:       m.mem[p++] = enc_rk(($urandom_range(0, 1)) ? OP_SET : OP_CLR, 0,
                                     $urandom_range(0, 7));
        9:       m.mem[p++] = enc_rk(($urandom_range(0, 1)) ? OP_LDD : OP_STD, rd,
                                     $urandom_range(DATA_LO, DATA_HI));
        10: begin
          x = $urandom_range(0, 7);
          m.mem[p++] = enc_rk(OP_LDI, x, $urandom_range(DATA_LO, DATA_HI));
          second[p] = 1;
          if ($urandom_range(0, 1)) m.mem[p++] = enc_rr(OP_LDX, rd, x);
          else                      m.mem[p++] = enc_rr(OP_STX, x, rs);
        end
        11, 12:  m.mem[p++] = enc_rk(opcode_e'($urandom_range(OP_BRC, OP_BRH)), 0,
                                     $urandom_range(0, 3));
        13:      m.mem[p++] = enc_rk(OP_JMP, 0, p + 1 + $urandom_range(0, 2));
        14: begin
          x = $urandom_range(0, 7);
          m.mem[p] = enc_rk(OP_LDI, x, p + 2 + $urandom_range(0, 2)); p++;
          second[p] = 1;
          m.mem[p++] = enc_rr(OP_JMR, x, 0);
        end
        default: m.mem[p++] = enc_rk(OP_NOP, 0, 0);
      endcase
    end
    for (int i = 0; i < 4; i++) m.mem[p++] = enc_rk(OP_HLT, 0, 0);
    // Move any jump target that falls on the second word of a pair back by
    // one, onto the pair's first word (still forward of the jump).
    for (int a = 0; a < p; a++) begin
      opcode_e op = opcode_e'(m.mem[a][15:11]);
      if (op inside {OP_BRC, OP_BRZ, OP_BRH}) begin
        t = a + 1 + int'(m.mem[a][7:0]);
        if (second[t]) m.mem[a][7:0] -= 1;
      end else if (op == OP_JMP || (op == OP_LDI && a + 1 < p && second[a + 1] &&
                                     m.mem[a + 1][15:11] == OP_JMR)) begin
        t = int'(m.mem[a][7:0]);
        if (second[t]) m.mem[a][7:0] -= 1;
      end
    end
    run_and_compare(m, idx % 4, $sformatf("random program %0d", idx));
  endtask

  initial begin
    static string names [6] = '{"register file", "OutReg", "Shftreg", "PC", "immediate", "memory"};
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_drv[i]) n_drv[i] = 0;
    directed();
    for (int i = 0; i < NPROG; i++) random_prog(40 + (i % 60), i);
    $display("cycles simulated %0d; wait states %0d, reads %0d, writes %0d",
             cyc_total, n_wait, n_rd, n_wr);
    $display("branches taken %0d (backward %0d), not taken %0d; carry %0d overflow %0d half %0d",
             n_taken, n_back, n_not_taken, n_carry, n_ovf, n_half);
    check(n_wait > 0, "no memory wait state happened");
    check(n_rd > 0 && n_wr > 0, "no memory read or write happened");
    check(n_taken > 0 && n_not_taken > 0, "taken or not-taken branch missing");
    check(n_back > 0, "no backward branch happened");
    check(n_carry > 0 && n_ovf > 0 && n_half > 0, "carry, overflow or half carry never produced");
    foreach (n_drv[i]) check(n_drv[i] > 0, $sformatf("bus driver %s never used", names[i]));
    for (int op = 0; op < 32; op++)
      check(n_op[op] > 0, $sformatf("opcode %s never executed", opcode_e'(op)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
