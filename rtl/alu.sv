// alu: arithmetic logic unit of the teaching CPU, built around a single adder.
//
// Every arithmetic operation goes through the same WIDTH-bit adder; only its
// operand and carry-in multiplexers change:
//   dst side : a, or 0 for the one-operand operations NEG, INC and PASS
//   src side : b or ~b
//   carry-in : 0, C, 1 or ~C
// so ADD = a+b+0, ADC = a+b+C, SUB = a+~b+1, SBC = a+~b+~C (C is "no borrow",
// as after SUB), NEG = 0+~b+1, INC = 0+b+1, PASS = 0+b+0.
// A separate logic block produces AND, OR, XOR and NOT (~b), and an output
// multiplexer picks the adder or the logic result. This one-adder structure,
// the four carry-in choices and the O/S/Z/C status flags follow the ALU block
// diagram of the design; the half-carry flag H (carry out of bit 3, used by
// the BRH branch), the zero dst input for one-operand operations and the
// flag values after logic operations (C, O, H cleared) are this design's
// choices.
//
// WIDTH defaults to 16; the design notes that the same ALU is also used at
// 4 bits for bench experiments, which WIDTH = 4 gives.
//
// Interface: a = dst operand (OpReg), b = src operand (data bus), s = alu_op_e,
// cin = current C flag. y and flags are purely combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [3:0]       s,
  input  logic             cin,
  output logic [WIDTH-1:0] y,
  output psw_t             flags
);

  alu_op_e          op;
  logic [WIDTH-1:0] dst, src, logic_y, sum;
  logic             carry_in, carry_out, half;
  logic             use_logic;

  assign op = alu_op_e'(s);

  // Operand and carry-in multiplexers in front of the adder.
  always_comb begin
    dst      = a;
    src      = b;
    carry_in = 1'b0;
    unique case (op)
      ALU_ADD:  begin src = b;  carry_in = 1'b0; end
      ALU_ADC:  begin src = b;  carry_in = cin;  end
      ALU_SUB:  begin src = ~b; carry_in = 1'b1; end
      ALU_SBC:  begin src = ~b; carry_in = ~cin; end
      ALU_NEG:  begin dst = '0; src = ~b; carry_in = 1'b1; end
      ALU_INC:  begin dst = '0; src = b;  carry_in = 1'b1; end
      default:  begin dst = '0; src = b;  carry_in = 1'b0; end  // PASS
    endcase
  end

  // The single adder. The half carry is the carry into bit 4, recovered from
  // the sum bit and the two operand bits.
  assign {carry_out, sum} = {1'b0, dst} + {1'b0, src} + (WIDTH+1)'(carry_in);
  if (WIDTH > 4) begin : g_half
    assign half = dst[4] ^ src[4] ^ sum[4];
  end else begin : g_half_narrow
    assign half = carry_out;   // a 4-bit ALU's bit-3 carry is its carry out
  end

  // Logic block.
  always_comb begin
    use_logic = 1'b1;
    unique case (op)
      ALU_AND: logic_y = a & b;
      ALU_OR:  logic_y = a | b;
      ALU_XOR: logic_y = a ^ b;
      ALU_NOT: logic_y = ~b;
      default: begin logic_y = '0; use_logic = 1'b0; end
    endcase
  end

  // Output multiplexer and status flags.
  always_comb begin
    y       = use_logic ? logic_y : sum;
    flags.s = y[WIDTH-1];
    flags.z = (y == '0);
    if (use_logic) begin
      flags.c = 1'b0;
      flags.o = 1'b0;
      flags.h = 1'b0;
    end else begin
      flags.c = carry_out;
      flags.o = (dst[WIDTH-1] == src[WIDTH-1]) && (sum[WIDTH-1] != dst[WIDTH-1]);
      flags.h = half;
    end
  end

endmodule
