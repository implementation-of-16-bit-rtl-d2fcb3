// tb_isa_pkg: instruction encoders and an instruction-level reference model
// of the CPU, for the testbenches.
//
// The model executes one instruction per step on its own copy of the
// registers, PSW and memory, written from the instruction descriptions
// rather than from the RTL, and also returns the number of clock cycles the
// FSM should need for it given the memory's wait states.
package tb_isa_pkg;
  import cpu_pkg::*;

  function automatic logic [15:0] enc_rr(opcode_e op, int rd, int rs, int cc = 0);
    return {op, 3'(rd), 3'(rs), 2'b00, 3'(cc)};
  endfunction

  function automatic logic [15:0] enc_rk(opcode_e op, int rd, int k);
    return {op, 3'(rd), 8'(k)};
  endfunction

  class isa_model;
    logic [15:0] mem [65536];
    logic [15:0] r [8];
    logic [15:0] pc;
    psw_t        psw;
    bit          halted;
    longint      cycles;
    int          wait_cycles;   // wait states of every memory access
    int          n_exec [32];   // instructions executed, per opcode
    int          n_taken, n_not_taken;

    function new();
      foreach (r[i]) r[i] = '0;
      pc = '0; psw = '0; halted = 0; cycles = 0; wait_cycles = 0;
      foreach (n_exec[i]) n_exec[i] = 0;
      n_taken = 0; n_not_taken = 0;
    endfunction

    // x + y + ci with all flags; the half carry is the carry out of bit 3.
    function automatic logic [15:0] add(logic [15:0] x, logic [15:0] y, int ci, bit set_flags);
      int unsigned full;
      logic [15:0] res;
      full = int'(x) + int'(y) + ci;
      res  = full[15:0];
      if (set_flags) begin
        psw.c = full[16];
        psw.h = (int'(x[3:0]) + int'(y[3:0]) + ci) >= 16;
        psw.o = (x[15] == y[15]) && (res[15] != x[15]);
        psw.s = res[15];
        psw.z = (res == 0);
      end
      return res;
    endfunction

    function automatic logic [15:0] logic_flags(logic [15:0] res);
      psw.c = 0; psw.h = 0; psw.o = 0; psw.s = res[15]; psw.z = (res == 0);
      return res;
    endfunction

    function automatic void step();
      logic [15:0] ir, k, sk, a, b;
      opcode_e     op;
      int          rd, rs, ex;
      bit          take;
      if (halted) return;
      ir = mem[pc];
      op = opcode_e'(ir[15:11]);
      rd = 32'(ir[10:8]); rs = 32'(ir[7:5]);
      k  = {8'h00, ir[7:0]};
      sk = {{8{ir[7]}}, ir[7:0]};
      pc = pc + 1;
      n_exec[op]++;
      a = r[rd]; b = r[rs];
      ex = 0;
      case (op)
        OP_NOP:  ex = 0;
        OP_HLT:  begin halted = 1; ex = 0; end
        OP_MOV:  begin r[rd] = b; ex = 2; end
        OP_ADD:  begin r[rd] = add(a, b, 0, 1); ex = 3; end
        OP_ADC:  begin r[rd] = add(a, b, 32'(psw.c), 1); ex = 3; end
        OP_SUB:  begin r[rd] = add(a, ~b, 1, 1); ex = 3; end
        OP_SBC:  begin r[rd] = add(a, ~b, 32'(!psw.c), 1); ex = 3; end
        OP_ADDI: begin r[rd] = add(a, k, 0, 1); ex = 3; end
        OP_SUBI: begin r[rd] = add(a, ~k, 1, 1); ex = 3; end
        OP_AND:  begin r[rd] = logic_flags(a & b); ex = 3; end
        OP_OR:   begin r[rd] = logic_flags(a | b); ex = 3; end
        OP_XOR:  begin r[rd] = logic_flags(a ^ b); ex = 3; end
        OP_NOT:  begin r[rd] = logic_flags(~a); ex = 2; end
        OP_NEG:  begin r[rd] = add(16'h0, ~a, 1, 1); ex = 2; end
        OP_SHL:  begin r[rd] = a * 2; ex = 2; end
        OP_SHR:  begin r[rd] = a / 2; ex = 2; end
        OP_ROL:  begin r[rd] = (a * 2) | (a / 16'h8000); ex = 2; end
        OP_ROR:  begin r[rd] = (a / 2) | ((a % 2) * 16'h8000); ex = 2; end
        OP_JMP:  begin pc = k; ex = 1; end
        OP_JMR:  begin pc = a; ex = 1; end
        OP_BRC, OP_BRZ, OP_BRH: begin
          take = (op == OP_BRC) ? psw.c : (op == OP_BRZ) ? psw.z : psw.h;
          if (take) begin pc = pc + sk; ex = 3; n_taken++; end
          else      begin ex = 0; n_not_taken++; end
        end
        OP_LDI:  begin r[rd] = k; ex = 1; end
        OP_LDD:  begin r[rd] = mem[k]; ex = 2 + wait_cycles; end
        OP_LDX:  begin r[rd] = mem[b]; ex = 2 + wait_cycles; end
        OP_STD:  begin mem[k] = a; ex = 2 + wait_cycles; end
        OP_STX:  begin mem[a] = b; ex = 2 + wait_cycles; end
        OP_LDP:  begin r[rd] = pc; ex = 1; end
        OP_CMP:  begin
          case (ir[2:0])
            0: psw.z = (a == b);
            1: psw.z = (a != b);
            2: psw.z = (a > b);
            3: psw.z = (a >= b);
            4: psw.z = (a < b);
            5: psw.z = (a <= b);
            default: psw.z = 0;
          endcase
          ex = 2;
        end
        OP_SET, OP_CLR: begin
          case (ir[2:0])
            0: psw.c = (op == OP_SET);
            1: psw.z = (op == OP_SET);
            2: psw.s = (op == OP_SET);
            3: psw.o = (op == OP_SET);
            4: psw.h = (op == OP_SET);
            default: ;
          endcase
          ex = 1;
        end
        default: ;
      endcase
      cycles += 3 + wait_cycles + ex;
    endfunction
  endclass

endpackage
