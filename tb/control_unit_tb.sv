// control_unit_tb: self-checking test of the control FSM on its own.
//
// The instruction register is replaced by a value the testbench holds, and
// READY comes from a wait-state counter. For every opcode, with random
// register numbers, constants and PSW contents, the testbench records each
// cycle's bus transfer (which unit drives the bus, which units load from it,
// memory strobes) as a short text and compares the sequence with the
// transfer list written here from the instruction descriptions:
// the three fetch transfers, then the execute transfers. Wait states must
// stretch exactly the memory cycles. PSW updates from SET/CLR, CMP and ALU
// flags are checked as well, and HLT must stop the sequence.
module control_unit_tb;
  import cpu_pkg::*;

  logic        clk = 0, rst = 1, ready, comp_y;
  logic [15:0] instr;
  psw_t        alu_flags, psw;
  ctrl_t       ctrl;
  logic        halted;
  int          wait_n = 0, wcnt = 0;
  int checks = 0, failures = 0, n_waits = 0;

  control_unit dut (.clk, .rst, .ready, .instr, .alu_flags, .comp_y, .ctrl, .psw, .halted);

  always #5 clk = ~clk;

  // Memory stand-in: READY after wait_n cycles of VMA.
  assign ready = ctrl.vma && (wcnt == wait_n);
  always @(posedge clk) begin
    if (!ctrl.vma || ready) wcnt <= 0;
    else begin wcnt <= wcnt + 1; n_waits++; end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One cycle's transfer as text: "<driver>><loads>[ memory]".
  function automatic string xfer(ctrl_t c);
    string src = "-", dst = "";
    if (c.reg_en)  src = $sformatf("R%0d", c.reg_sel);
    if (c.out_en)  src = "OUT";
    if (c.shft_en) src = "SH";
    if (c.pc_en)   src = "PC";
    if (c.imm_en)  src = $sformatf("#%h", c.imm);
    if (c.mem_en)  src = "MEM";
    if (c.opreg_ld) dst = {dst, " op"};
    if (c.instr_ld) dst = {dst, " ir"};
    if (c.addr_ld)  dst = {dst, " ar"};
    if (c.out_ld)   dst = {dst, " out:", c.alu_sel.name()};
    if (c.shft_ld)  dst = {dst, " sh:", c.shift_sel.name()};
    if (c.pc_ld)    dst = {dst, " pc"};
    if (c.reg_we)   dst = {dst, $sformatf(" R%0d", c.reg_sel)};
    if (c.vma)      dst = {dst, c.rw ? " WRITE" : " READ"};
    if (c.data_oe)  dst = {dst, " D"};
    return {src, ">", dst};
  endfunction

  // Expected execute transfers of one instruction.
  function automatic void expected(logic [15:0] ir, psw_t f, ref string q[$]);
    opcode_e op = opcode_e'(ir[15:11]);
    int rd = ir[10:8], rs = ir[7:5];
    string k  = $sformatf("#%h", {8'h00, ir[7:0]});
    string sk = $sformatf("#%h", {{8{ir[7]}}, ir[7:0]});
    string m  = "";
    q.delete();
    case (op)
      OP_MOV: begin q.push_back($sformatf("R%0d> out:ALU_PASS", rs)); q.push_back($sformatf("OUT> R%0d", rd)); end
      OP_ADD, OP_ADC, OP_SUB, OP_SBC, OP_AND, OP_OR, OP_XOR, OP_ADDI, OP_SUBI: begin
        case (op)
          OP_ADD, OP_ADDI: m = "ALU_ADD";
          OP_ADC:          m = "ALU_ADC";
          OP_SUB, OP_SUBI: m = "ALU_SUB";
          OP_SBC:          m = "ALU_SBC";
          OP_AND:          m = "ALU_AND";
          OP_OR:           m = "ALU_OR";
          default:         m = "ALU_XOR";
        endcase
        q.push_back($sformatf("R%0d> op", rd));
        if (op == OP_ADDI || op == OP_SUBI) q.push_back($sformatf("%s> out:%s", k, m));
        else                                q.push_back($sformatf("R%0d> out:%s", rs, m));
        q.push_back($sformatf("OUT> R%0d", rd));
      end
      OP_NOT, OP_NEG: begin
        q.push_back($sformatf("R%0d> out:%s", rd, op == OP_NOT ? "ALU_NOT" : "ALU_NEG"));
        q.push_back($sformatf("OUT> R%0d", rd));
      end
      OP_SHL, OP_SHR, OP_ROL, OP_ROR: begin
        case (op)
          OP_SHL: m = "SH_SHL"; OP_SHR: m = "SH_SHR"; OP_ROL: m = "SH_ROL"; default: m = "SH_ROR";
        endcase
        q.push_back($sformatf("R%0d> sh:%s", rd, m));
        q.push_back($sformatf("SH> R%0d", rd));
      end
      OP_JMP: q.push_back($sformatf("%s> pc", k));
      OP_JMR: q.push_back($sformatf("R%0d> pc", rd));
      OP_BRC, OP_BRZ, OP_BRH:
        if ((op == OP_BRC && f.c) || (op == OP_BRZ && f.z) || (op == OP_BRH && f.h)) begin
          q.push_back("PC> op");
          q.push_back($sformatf("%s> out:ALU_ADD", sk));
          q.push_back("OUT> pc");
        end
      OP_LDI: q.push_back($sformatf("%s> R%0d", k, rd));
      OP_LDP: q.push_back($sformatf("PC> R%0d", rd));
      OP_LDD: begin q.push_back($sformatf("%s> ar", k)); q.push_back($sformatf("MEM> R%0d READ", rd)); end
      OP_LDX: begin q.push_back($sformatf("R%0d> ar", rs)); q.push_back($sformatf("MEM> R%0d READ", rd)); end
      OP_STD: begin q.push_back($sformatf("%s> ar", k)); q.push_back($sformatf("R%0d> WRITE D", rd)); end
      OP_STX: begin q.push_back($sformatf("R%0d> ar", rd)); q.push_back($sformatf("R%0d> WRITE D", rs)); end
      OP_CMP: begin q.push_back($sformatf("R%0d> op", rd)); q.push_back($sformatf("R%0d>", rs)); end
      OP_SET, OP_CLR: q.push_back("->");
      default: ;  // NOP
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Run one instruction from FETCH0 up to the next FETCH0 and compare.
  task automatic run_one(logic [15:0] ir);
    string q[$], got[$], s;
    psw_t  psw0;
    opcode_e op = opcode_e'(ir[15:11]);
    int    cyc = 0;
    instr  = ir;
    psw0 = psw;
    expected(ir, psw0, q);
    // Fetch: PC -> AddrReg and OutReg <- PC + 1, memory read, OutReg -> PC.
    check(xfer(ctrl) == "PC> ar out:ALU_INC", $sformatf("%s fetch0: %s", op.name(), xfer(ctrl)));
    @(posedge clk); #1;
    for (int w = 0; w < wait_n; w++) begin
      check(xfer(ctrl) == "-> READ", $sformatf("%s wait: %s", op.name(), xfer(ctrl)));
      @(posedge clk); #1;
    end
    check(xfer(ctrl) == "MEM> ir READ", $sformatf("%s fetch1: %s", op.name(), xfer(ctrl)));
    @(posedge clk); #1;
    check(xfer(ctrl) == "OUT> pc", $sformatf("%s fetch2: %s", op.name(), xfer(ctrl)));
    @(posedge clk); #1;
    if (op == OP_HLT) begin
      repeat (3) begin
        check(halted && xfer(ctrl) == "->", $sformatf("HLT: halted=%b %s", halted, xfer(ctrl)));
        @(posedge clk); #1;
      end
      return;
    end
    while (xfer(ctrl) != "PC> ar out:ALU_INC" && cyc < 40) begin
      s = xfer(ctrl);
      if (!(ctrl.vma && !ready)) got.push_back(s);   // wait cycles are not transfers
      @(posedge clk); #1;
      cyc++;
    end
    check(got.size() == q.size(), $sformatf("%s: %0d execute transfers, expected %0d",
                                            op.name(), got.size(), q.size()));
    foreach (q[i]) if (i < got.size())
      check(got[i] == q[i], $sformatf("%s step %0d: '%s' expected '%s'", op.name(), i, got[i], q[i]));
    // PSW effects.
    case (op)
      OP_SET, OP_CLR: begin
        psw_t e = psw0;
        case (ir[2:0])
          0: e.c = (op == OP_SET); 1: e.z = (op == OP_SET); 2: e.s = (op == OP_SET);
          3: e.o = (op == OP_SET); 4: e.h = (op == OP_SET); default: ;
        endcase
        check(psw == e, $sformatf("%s %0d: psw=%b expected %b", op.name(), ir[2:0], psw, e));
      end
      OP_CMP: begin
        psw_t e = psw0;
        e.z = comp_y;
        check(psw == e, $sformatf("CMP: psw=%b expected %b", psw, e));
      end
      OP_ADD, OP_ADC, OP_SUB, OP_SBC, OP_AND, OP_OR, OP_XOR, OP_ADDI, OP_SUBI, OP_NOT, OP_NEG:
        check(psw == alu_flags, $sformatf("%s: psw=%b expected ALU flags %b", op.name(), psw, alu_flags));
      default:
        check(psw == psw0, $sformatf("%s changed the psw: %b -> %b", op.name(), psw0, psw));
    endcase
  endtask

  initial begin
    instr = '0; comp_y = 0; alu_flags = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 600; n++) begin
      int op;
      op = (n < 62) ? (n % 31) + 1 : $urandom_range(0, 31);
      if (op == int'(OP_HLT)) op = int'(OP_NOP);
      wait_n = (n % 3 == 0) ? $urandom_range(1, 3) : 0;
      alu_flags = psw_t'($urandom);
      comp_y = 1'($urandom);
      // Put random flags in the PSW first with SET/CLR.
      if (n % 2 == 0) run_one({(($urandom_range(0, 1)) ? OP_SET : OP_CLR), 8'h00, 3'($urandom_range(0, 4))});
      run_one(16'($urandom) & 16'h07ff | (16'(op) << 11));
    end
    run_one({OP_HLT, 11'h0});
    check(n_waits > 0, "no wait state was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
