// fib_tb: Fibonacci workload on the complete CPU.
//
// The program below computes F(0)..F(N-1) and stores them at 0x80 onward.
// It uses a subroutine for each step of the series: the caller builds its
// return address with LDP and ADDI, pushes it on a stack in memory (R6 is
// the stack pointer, STX and SUBI), and jumps; the subroutine updates the
// pair of numbers, pops the return address (ADDI and LDX) and returns with
// JMR. The loop counter is tested with CMP and a backward BRZ. So the run
// touches the stack, subroutine linkage, RAM reads and writes, ALU, compare
// and branch. Results are checked against the series computed here, and the
// cycle count against the instruction-level model. Memory has one wait state.
module fib_tb;
  import cpu_pkg::*;
  import tb_isa_pkg::*;

  localparam int N = 25;   // F(24) = 46368, the largest Fibonacci number below 2**16

  logic        clk = 0, rst = 1;
  logic        ready, data_oe, vma, rw, halted;
  logic [15:0] data_in, data_out, addr, dbg_pc, dbg_ir, dbg_bus;
  logic [15:0] dbg_opreg, dbg_outreg, dbg_shftreg;
  psw_t        dbg_psw;
  logic [3:0]  wait_cycles = 4'd1;
  int checks = 0, failures = 0;

  cpu dut (.*);

  mem_model #(.AW(16)) u_mem (
    .clk, .vma, .rw, .addr, .wdata(data_out), .wait_cycles, .ready, .rdata(data_in)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    isa_model m = new();
    int p = 0, cyc = 0;
    logic [15:0] f0 = 0, f1 = 1, fn;
    for (int i = 0; i < 65536; i++) m.mem[i] = '0;
    m.mem[p++] = enc_rk(OP_LDI, 1, 0);             //  0  a = F(0)
    m.mem[p++] = enc_rk(OP_LDI, 2, 1);             //  1  b = F(1)
    m.mem[p++] = enc_rk(OP_LDI, 3, 'h80);          //  2  result pointer
    m.mem[p++] = enc_rk(OP_LDI, 4, N);             //  3  count
    m.mem[p++] = enc_rk(OP_LDI, 6, 'hff);          //  4  stack pointer
    m.mem[p++] = enc_rr(OP_STX, 3, 1);             //  5  loop: [ptr] = a
    m.mem[p++] = enc_rk(OP_LDP, 7, 0);             //  6  R7 = 7
    m.mem[p++] = enc_rk(OP_ADDI, 7, 4);            //  7  return address 11
    m.mem[p++] = enc_rr(OP_STX, 6, 7);             //  8  push
    m.mem[p++] = enc_rk(OP_SUBI, 6, 1);            //  9
    m.mem[p++] = enc_rk(OP_JMP, 0, 16);            // 10  call step
    m.mem[p++] = enc_rk(OP_ADDI, 3, 1);            // 11
    m.mem[p++] = enc_rk(OP_SUBI, 4, 1);            // 12
    m.mem[p++] = enc_rr(OP_CMP, 4, 0, CMP_NEQ);    // 13  Z = (count != 0)
    m.mem[p++] = enc_rk(OP_BRZ, 0, 5 - 15);        // 14  back to loop
    m.mem[p++] = enc_rk(OP_HLT, 0, 0);             // 15
    m.mem[p++] = enc_rr(OP_MOV, 5, 2);             // 16  step: t = b
    m.mem[p++] = enc_rr(OP_ADD, 5, 1);             // 17  t = a + b
    m.mem[p++] = enc_rr(OP_MOV, 1, 2);             // 18  a = b
    m.mem[p++] = enc_rr(OP_MOV, 2, 5);             // 19  b = t
    m.mem[p++] = enc_rk(OP_ADDI, 6, 1);            // 20  pop
    m.mem[p++] = enc_rr(OP_LDX, 7, 6);             // 21
    m.mem[p++] = enc_rr(OP_JMR, 7, 0);             // 22  return
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = m.mem[i];
    m.wait_cycles = 1;
    while (!m.halted) m.step();

    repeat (2) @(posedge clk);
    #1 rst = 0;
    while (!halted) begin @(posedge clk); cyc++; #1; end

    for (int i = 0; i < N; i++) begin
      checks++;
      if (u_mem.mem['h80 + i] !== f0) begin
        failures++;
        $display("FAIL F(%0d) = %0d, expected %0d", i, u_mem.mem['h80 + i], f0);
      end
      fn = f0 + f1; f0 = f1; f1 = fn;
    end
    checks++;
    if (cyc != m.cycles) begin
      failures++;
      $display("FAIL %0d cycles, expected %0d", cyc, m.cycles);
    end
    checks++;
    if (dut.u_regs.regs[6] !== 16'hff) begin
      failures++;
      $display("FAIL stack pointer %h, expected ff", dut.u_regs.regs[6]);
    end
    $display("F(0..%0d) in %0d cycles; F(%0d) = %0d", N - 1, cyc, N - 1, u_mem.mem['h80 + N - 1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
