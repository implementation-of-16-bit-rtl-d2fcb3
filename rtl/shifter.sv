// shifter: one-place shift and rotate unit of the teaching CPU.
//
// Combinational. Operations (s, shift_op_e): PASS, SHL (shift left, 0 into
// bit 0), SHR (shift right, 0 into the top bit), ROL and ROR (rotate by one).
// SHL and SHR with zero fill are the instruction set's own; the rotations
// follow the design's mention of rotation, and the 3-bit select width is the
// one shown for the shifter's port. Unused select codes pass the operand.
// Its result is captured in the Shftreg bus register.
module shifter
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [2:0]       s,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    unique case (shift_op_e'(s))
      SH_SHL:  y = {a[WIDTH-2:0], 1'b0};
      SH_SHR:  y = {1'b0, a[WIDTH-1:1]};
      SH_ROL:  y = {a[WIDTH-2:0], a[WIDTH-1]};
      SH_ROR:  y = {a[0], a[WIDTH-1:1]};
      default: y = a;
    endcase
  end

endmodule
