// comparator: magnitude comparator of the teaching CPU.
//
// Combinational. Compares a (OpReg) with b (data bus) as unsigned numbers and
// returns in y whether the relation chosen by s (cmp_op_e: EQ, NEQ, GT, GTE,
// LT, LTE) holds; unused select codes give 0. The ports a, b, s(2:0) and the
// single-bit y follow the comparator's port list; the relation set and the
// unsigned reading are this design's choices. The control unit copies y into
// the Z flag for the CMP instruction.
module comparator
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [2:0]       s,
  output logic             y
);

  always_comb begin
    unique case (cmp_op_e'(s))
      CMP_EQ:  y = (a == b);
      CMP_NEQ: y = (a != b);
      CMP_GT:  y = (a >  b);
      CMP_GTE: y = (a >= b);
      CMP_LT:  y = (a <  b);
      CMP_LTE: y = (a <= b);
      default: y = 1'b0;
    endcase
  end

endmodule
