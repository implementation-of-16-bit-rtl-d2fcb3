// cpu_pkg: types and constants shared by the 16-bit bus-based teaching CPU.
//
// Holds the instruction encoding (5-bit opcode in bits 15:11, Rd in 10:8,
// Rs in 7:5, 8-bit constant or address K/A in 7:0), the operation codes of the
// ALU, the shifter and the comparator, and the program status word (PSW).
// The field positions and the mnemonics follow the original instruction
// format and instruction set; the numeric opcode values are this design's own
// assignment, since the original defines mnemonics but no codes.
package cpu_pkg;

  localparam int unsigned XLEN = 16;   // data bus, register and address width
  localparam int unsigned NREG = 8;    // general registers R0..R7

  // Opcodes (instruction bits 15:11).
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,   // no operation
    OP_HLT  = 5'd1,   // STOP: halt until reset
    OP_MOV  = 5'd2,   // Rd <- Rs
    OP_ADD  = 5'd3,   // Rd <- Rd + Rs
    OP_ADC  = 5'd4,   // Rd <- Rd + Rs + C
    OP_SUB  = 5'd5,   // Rd <- Rd - Rs
    OP_SBC  = 5'd6,   // Rd <- Rd - Rs - borrow
    OP_ADDI = 5'd7,   // Rd <- Rd + k
    OP_SUBI = 5'd8,   // Rd <- Rd - k
    OP_AND  = 5'd9,   // Rd <- Rd and Rs
    OP_OR   = 5'd10,  // Rd <- Rd or Rs
    OP_XOR  = 5'd11,  // Rd <- Rd xor Rs
    OP_NOT  = 5'd12,  // Rd <- not Rd
    OP_NEG  = 5'd13,  // Rd <- -Rd
    OP_SHL  = 5'd14,  // Rd <- Rd << 1
    OP_SHR  = 5'd15,  // Rd <- Rd >> 1
    OP_ROL  = 5'd16,  // Rd <- rotate left
    OP_ROR  = 5'd17,  // Rd <- rotate right
    OP_JMP  = 5'd18,  // PC <- k
    OP_JMR  = 5'd19,  // PC <- Rd
    OP_BRC  = 5'd20,  // if C then PC <- PC + k
    OP_BRZ  = 5'd21,  // if Z then PC <- PC + k
    OP_BRH  = 5'd22,  // if H then PC <- PC + k
    OP_LDI  = 5'd23,  // Rd <- k
    OP_LDD  = 5'd24,  // Rd <- [A]
    OP_LDX  = 5'd25,  // Rd <- [Rs]
    OP_STD  = 5'd26,  // [A] <- Rd
    OP_STX  = 5'd27,  // [Rd] <- Rs
    OP_LDP  = 5'd28,  // Rd <- PC
    OP_CMP  = 5'd29,  // Z <- (Rd cc Rs), cc in bits 2:0
    OP_SET  = 5'd30,  // PSW flag k(2:0) <- 1
    OP_CLR  = 5'd31   // PSW flag k(2:0) <- 0
  } opcode_e;

  // ALU operations. a is the dst operand (OpReg), b the src operand (bus).
  typedef enum logic [3:0] {
    ALU_ADD  = 4'd0,   // a + b
    ALU_ADC  = 4'd1,   // a + b + C
    ALU_SUB  = 4'd2,   // a + ~b + 1
    ALU_SBC  = 4'd3,   // a + ~b + ~C   (C holds "no borrow")
    ALU_AND  = 4'd4,
    ALU_OR   = 4'd5,
    ALU_XOR  = 4'd6,
    ALU_NOT  = 4'd7,   // ~b
    ALU_NEG  = 4'd8,   // 0 + ~b + 1
    ALU_INC  = 4'd9,   // 0 + b + 1
    ALU_PASS = 4'd10   // 0 + b + 0
  } alu_op_e;

  // Shifter operations.
  typedef enum logic [2:0] {
    SH_PASS = 3'd0,
    SH_SHL  = 3'd1,
    SH_SHR  = 3'd2,
    SH_ROL  = 3'd3,
    SH_ROR  = 3'd4
  } shift_op_e;

  // Comparator relations (unsigned).
  typedef enum logic [2:0] {
    CMP_EQ  = 3'd0,
    CMP_NEQ = 3'd1,
    CMP_GT  = 3'd2,
    CMP_GTE = 3'd3,
    CMP_LT  = 3'd4,
    CMP_LTE = 3'd5
  } cmp_op_e;

  // Program status word.
  typedef struct packed {
    logic o;   // two's-complement overflow
    logic s;   // sign (result bit 15)
    logic z;   // zero
    logic c;   // carry out of the adder
    logic h;   // half carry: carry out of bit 3
  } psw_t;

  // Flag numbers used by SET and CLR (instruction bits 2:0).
  localparam logic [2:0] FLAG_C = 3'd0;
  localparam logic [2:0] FLAG_Z = 3'd1;
  localparam logic [2:0] FLAG_S = 3'd2;
  localparam logic [2:0] FLAG_O = 3'd3;
  localparam logic [2:0] FLAG_H = 3'd4;

  // Instruction word fields.
  typedef struct packed {
    opcode_e    op;   // 15:11
    logic [2:0] rd;   // 10:8
    logic [7:0] k;    // 7:0  constant / address; Rs is k[7:5]
  } instr_t;

  // Control word: every strobe the control unit drives into the datapath in
  // one clock cycle. *_en lets a unit drive the internal data bus, *_ld / *_we
  // loads a register from it at the next rising clock edge.
  typedef struct packed {
    logic            reg_en;     // register file drives the bus
    logic            reg_we;     // register file loads from the bus
    logic [2:0]      reg_sel;    // register number
    logic            opreg_ld;   // OpReg <- bus
    logic            instr_ld;   // InstrReg <- bus
    logic            addr_ld;    // AddrReg <- bus
    logic            out_ld;     // OutReg <- ALU result
    logic            out_en;     // OutReg drives the bus
    logic            shft_ld;    // Shftreg <- shifter result
    logic            shft_en;    // Shftreg drives the bus
    logic            pc_ld;      // PC <- bus
    logic            pc_en;      // PC drives the bus
    logic            imm_en;     // control unit drives imm on the bus
    logic [XLEN-1:0] imm;        // constant taken from the instruction
    logic            mem_en;     // external data input drives the bus
    alu_op_e         alu_sel;
    shift_op_e       shift_sel;
    cmp_op_e         comp_sel;
    logic            vma;        // valid memory address
    logic            rw;         // 0 read, 1 write
    logic            data_oe;    // bus value driven on the external data lines
  } ctrl_t;

endpackage
