// control_unit: finite-state machine that runs the teaching CPU.
//
// The CPU has one internal data bus, so each instruction is a sequence of
// bus transfers, one per clock, and this FSM chooses for every cycle which
// unit drives the bus and which units load from it (the ctrl_t word).
//
// Fetch, common to all instructions:
//   FETCH0  PC -> bus; AddrReg <- bus; OutReg <- bus + 1 (ALU INC)
//   FETCH1  VMA=1, R/W=0; wait for READY; InstrReg <- memory data
//   FETCH2  OutReg -> bus; PC <- bus; decode the opcode
// Execute, by instruction class:
//   ALU two-operand  RD0: Rd -> OpReg;  ALU: Rs or k -> bus, OutReg <- ALU,
//                    PSW <- flags;  WB: OutReg -> Rd
//   MOV/NOT/NEG      ALU: Rs (MOV) or Rd -> bus, OutReg <- ALU;  WB
//   shifts           SH: Rd -> bus, Shftreg <- shifter;  SHWB: Shftreg -> Rd
//   LDI, LDP         LD: k or PC -> bus -> Rd
//   JMP, JMR         PCLD: k or Rd -> bus -> PC
//   BRC/BRZ/BRH      if the flag is set: BR0: PC -> OpReg;  BR1: sign-extended
//                    k -> bus, OutReg <- ALU ADD;  BR2: OutReg -> PC
//   LDD/LDX          ADDR: A or Rs -> AddrReg;  MRD: VMA=1,R/W=0, wait READY,
//                    memory data -> Rd
//   STD/STX          ADDR: A or Rd -> AddrReg;  MWR: Rd or Rs -> bus -> data
//                    lines, VMA=1, R/W=1, wait READY
//   CMP              RD0: Rd -> OpReg;  CMP: Rs -> bus, Z <- comparator
//   SET/CLR          FLAG: PSW bit k(2:0) set or cleared
//   HLT              HALT until reset
// A memory access holds VMA, R/W and the address until the memory answers
// with READY high for a cycle; the transfer completes in that cycle.
//
// The PSW (O,S,Z,C,H) lives here: the ALU instructions load it from the ALU
// flags, CMP writes the comparator result into Z, SET/CLR change one bit,
// and the conditional branches read it. Branch offsets are relative to the
// address of the next instruction, because the PC has already been advanced.
//
// Following the design: the fetch/decode/execute order, OpReg and OutReg use,
// the VMA / R/W / READY handshake, the instruction mnemonics and fields.
// This design's choices: the state sequence itself, opcode values, the use
// of the ALU to increment the PC, zero-extension of k except for branch
// offsets, the CMP instruction's condition field in bits 2:0.
module control_unit
  import cpu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ready,    // memory has completed the access
  input  logic [XLEN-1:0] instr,    // InstrReg contents
  input  psw_t            alu_flags,
  input  logic            comp_y,
  output ctrl_t           ctrl,
  output psw_t            psw,
  output logic            halted
);

  typedef enum logic [4:0] {
    S_FETCH0, S_FETCH1, S_FETCH2,
    S_RD0, S_ALU, S_WB,
    S_SH, S_SHWB,
    S_LD, S_PCLD,
    S_BR0, S_BR1, S_BR2,
    S_ADDR, S_MRD, S_MWR,
    S_CMP, S_FLAG, S_HALT
  } state_e;

  state_e     state, next;
  instr_t     ir;
  logic [2:0] rs;
  logic       taken;

  assign ir = instr_t'(instr);
  assign rs = ir.k[7:5];

  always_comb begin
    unique case (ir.op)
      OP_BRC:  taken = psw.c;
      OP_BRZ:  taken = psw.z;
      OP_BRH:  taken = psw.h;
      default: taken = 1'b0;
    endcase
  end

  // ALU operation of an ALU-class instruction.
  function automatic alu_op_e alu_of(opcode_e op);
    unique case (op)
      OP_ADD, OP_ADDI: return ALU_ADD;
      OP_ADC:          return ALU_ADC;
      OP_SUB, OP_SUBI: return ALU_SUB;
      OP_SBC:          return ALU_SBC;
      OP_AND:          return ALU_AND;
      OP_OR:           return ALU_OR;
      OP_XOR:          return ALU_XOR;
      OP_NOT:          return ALU_NOT;
      OP_NEG:          return ALU_NEG;
      default:         return ALU_PASS;
    endcase
  endfunction

  // Decode: first execute state after FETCH2.
  function automatic state_e first_state(opcode_e op, logic br_taken);
    unique case (op)
      OP_NOP:                                    return S_FETCH0;
      OP_HLT:                                    return S_HALT;
      OP_MOV, OP_NOT, OP_NEG:                    return S_ALU;
      OP_ADD, OP_ADC, OP_SUB, OP_SBC, OP_ADDI,
      OP_SUBI, OP_AND, OP_OR, OP_XOR, OP_CMP:    return S_RD0;
      OP_SHL, OP_SHR, OP_ROL, OP_ROR:            return S_SH;
      OP_LDI, OP_LDP:                            return S_LD;
      OP_JMP, OP_JMR:                            return S_PCLD;
      OP_BRC, OP_BRZ, OP_BRH:                    return br_taken ? S_BR0 : S_FETCH0;
      OP_LDD, OP_LDX, OP_STD, OP_STX:            return S_ADDR;
      OP_SET, OP_CLR:                            return S_FLAG;
      default:                                   return S_FETCH0;
    endcase
  endfunction

  // Next state.
  always_comb begin
    next = state;
    unique case (state)
      S_FETCH0: next = S_FETCH1;
      S_FETCH1: if (ready) next = S_FETCH2;
      S_FETCH2: next = first_state(ir.op, taken);
      S_RD0:    next = (ir.op == OP_CMP) ? S_CMP : S_ALU;
      S_ALU:    next = S_WB;
      S_SH:     next = S_SHWB;
      S_BR0:    next = S_BR1;
      S_BR1:    next = S_BR2;
      S_ADDR:   next = (ir.op == OP_LDD || ir.op == OP_LDX) ? S_MRD : S_MWR;
      S_MRD,
      S_MWR:    if (ready) next = S_FETCH0;
      S_HALT:   next = S_HALT;
      default:  next = S_FETCH0;   // WB, SHWB, LD, PCLD, BR2, CMP, FLAG
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_FETCH0;
    else     state <= next;
  end

  // Control word for the current state.
  always_comb begin
    ctrl           = '0;
    ctrl.alu_sel   = ALU_PASS;
    ctrl.shift_sel = SH_PASS;
    ctrl.comp_sel  = cmp_op_e'(ir.k[2:0]);
    ctrl.reg_sel   = ir.rd;
    ctrl.imm       = {{(XLEN-8){1'b0}}, ir.k};
    unique case (state)
      S_FETCH0: begin
        ctrl.pc_en   = 1'b1;
        ctrl.addr_ld = 1'b1;
        ctrl.alu_sel = ALU_INC;
        ctrl.out_ld  = 1'b1;
      end
      S_FETCH1: begin
        ctrl.vma      = 1'b1;
        ctrl.mem_en   = ready;
        ctrl.instr_ld = ready;
      end
      S_FETCH2: begin
        ctrl.out_en = 1'b1;
        ctrl.pc_ld  = 1'b1;
      end
      S_RD0: begin
        ctrl.reg_en   = 1'b1;
        ctrl.opreg_ld = 1'b1;
      end
      S_ALU: begin
        ctrl.alu_sel = alu_of(ir.op);
        ctrl.out_ld  = 1'b1;
        if (ir.op == OP_ADDI || ir.op == OP_SUBI) begin
          ctrl.imm_en = 1'b1;
        end else begin
          ctrl.reg_en = 1'b1;
          if (ir.op != OP_NOT && ir.op != OP_NEG) ctrl.reg_sel = rs;
        end
      end
      S_WB: begin
        ctrl.out_en = 1'b1;
        ctrl.reg_we = 1'b1;
      end
      S_SH: begin
        ctrl.reg_en    = 1'b1;
        ctrl.shft_ld   = 1'b1;
        unique case (ir.op)
          OP_SHL:  ctrl.shift_sel = SH_SHL;
          OP_SHR:  ctrl.shift_sel = SH_SHR;
          OP_ROL:  ctrl.shift_sel = SH_ROL;
          default: ctrl.shift_sel = SH_ROR;
        endcase
      end
      S_SHWB: begin
        ctrl.shft_en = 1'b1;
        ctrl.reg_we  = 1'b1;
      end
      S_LD: begin
        if (ir.op == OP_LDP) ctrl.pc_en = 1'b1;
        else                 ctrl.imm_en = 1'b1;
        ctrl.reg_we = 1'b1;
      end
      S_PCLD: begin
        if (ir.op == OP_JMR) ctrl.reg_en = 1'b1;
        else                 ctrl.imm_en = 1'b1;
        ctrl.pc_ld = 1'b1;
      end
      S_BR0: begin
        ctrl.pc_en    = 1'b1;
        ctrl.opreg_ld = 1'b1;
      end
      S_BR1: begin
        ctrl.imm     = {{(XLEN-8){ir.k[7]}}, ir.k};
        ctrl.imm_en  = 1'b1;
        ctrl.alu_sel = ALU_ADD;
        ctrl.out_ld  = 1'b1;
      end
      S_BR2: begin
        ctrl.out_en = 1'b1;
        ctrl.pc_ld  = 1'b1;
      end
      S_ADDR: begin
        unique case (ir.op)
          OP_LDX:  begin ctrl.reg_en = 1'b1; ctrl.reg_sel = rs; end
          OP_STX:  ctrl.reg_en = 1'b1;
          default: ctrl.imm_en = 1'b1;
        endcase
        ctrl.addr_ld = 1'b1;
      end
      S_MRD: begin
        ctrl.vma    = 1'b1;
        ctrl.mem_en = ready;
        ctrl.reg_we = ready;
      end
      S_MWR: begin
        ctrl.vma     = 1'b1;
        ctrl.rw      = 1'b1;
        ctrl.reg_en  = 1'b1;
        ctrl.data_oe = 1'b1;
        if (ir.op == OP_STX) ctrl.reg_sel = rs;
      end
      S_CMP: begin
        ctrl.reg_en  = 1'b1;
        ctrl.reg_sel = rs;
      end
      default: ;   // FLAG, HALT: no bus transfer
    endcase
  end

  // Program status word.
  always_ff @(posedge clk) begin
    if (rst) begin
      psw <= '0;
    end else begin
      unique case (state)
        S_ALU:  if (ir.op != OP_MOV) psw <= alu_flags;
        S_CMP:  psw.z <= comp_y;
        S_FLAG: begin
          unique case (ir.k[2:0])
            FLAG_C:  psw.c <= (ir.op == OP_SET);
            FLAG_Z:  psw.z <= (ir.op == OP_SET);
            FLAG_S:  psw.s <= (ir.op == OP_SET);
            FLAG_O:  psw.o <= (ir.op == OP_SET);
            FLAG_H:  psw.h <= (ir.op == OP_SET);
            default: ;
          endcase
        end
        default: ;
      endcase
    end
  end

  assign halted = (state == S_HALT);

  // Exactly one source may drive the internal bus at a time.
  a_one_driver: assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.reg_en, ctrl.out_en, ctrl.shft_en, ctrl.pc_en, ctrl.imm_en, ctrl.mem_en}));
  // A memory access keeps its direction until READY.
  a_rw_stable: assert property (@(posedge clk) disable iff (rst)
    (ctrl.vma && !ready) |=> (ctrl.vma && $stable(ctrl.rw)));

endmodule
