// alu_tb: self-checking test of the one-adder ALU.
//
// Drives every operation with corner operands and random operands, both carry
// inputs, and compares the result and the O/S/Z/C/H flags with values
// computed here from integer arithmetic (the half carry from the sum of the
// low nibbles). Purely combinational, so checks are taken after a short
// delay; the watchdog bounds the run in time.
module alu_tb;
  import cpu_pkg::*;

  localparam int W = 16;

  logic [W-1:0] a, b, y;
  logic [3:0]   s;
  logic         cin;
  psw_t         flags;
  int checks = 0, failures = 0;

  alu #(.WIDTH(W)) dut (.a, .b, .s, .cin, .y, .flags);

  // The 4-bit configuration, tested exhaustively below.
  logic [3:0] a4, b4, y4;
  psw_t       flags4;
  alu #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .s, .cin, .y(y4), .flags(flags4));

  // Reference: returns {o,s,z,c,h} and result.
  task automatic expect_op(input alu_op_e op);
    logic [W:0]   full;
    logic [W-1:0] r, x, v;
    logic         c, o, h, logic_op;
    int unsigned  ci;
    logic_op = 0; x = a; v = b; ci = 0;
    case (op)
      ALU_ADD:  begin x = a;  v = b;  ci = 0; end
      ALU_ADC:  begin x = a;  v = b;  ci = cin; end
      ALU_SUB:  begin x = a;  v = ~b; ci = 1; end
      ALU_SBC:  begin x = a;  v = ~b; ci = !cin; end
      ALU_NEG:  begin x = 0;  v = ~b; ci = 1; end
      ALU_INC:  begin x = 0;  v = b;  ci = 1; end
      ALU_PASS: begin x = 0;  v = b;  ci = 0; end
      default:  logic_op = 1;
    endcase
    full = {1'b0, x} + {1'b0, v} + ci;
    r = full[W-1:0]; c = full[W];
    h = ((int'(x[3:0]) + int'(v[3:0]) + ci) > 15);
    o = (x[W-1] == v[W-1]) && (r[W-1] != x[W-1]);
    if (logic_op) begin
      case (op)
        ALU_AND: r = a & b;
        ALU_OR:  r = a | b;
        ALU_XOR: r = a ^ b;
        default: r = ~b;
      endcase
      c = 0; o = 0; h = 0;
    end
    if (op == ALU_SUB && a >= b && !c) begin  // sanity of the reference itself
      $display("reference error"); failures++;
    end
    checks++;
    if (y !== r || flags.c !== c || flags.z !== (r == 0) || flags.s !== r[W-1] ||
        flags.o !== o || flags.h !== h) begin
      failures++;
      if (failures < 10)
        $display("FAIL op=%s a=%h b=%h cin=%b: y=%h flags=%b, expected y=%h o%b s%b z%b c%b h%b",
                 op.name(), a, b, cin, y, flags, r, o, r[W-1], r == 0, c, h);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corners[6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h000f};
    // Corner operands, every operation.
    for (int op = 0; op <= int'(ALU_PASS); op++)
      foreach (corners[i]) foreach (corners[j]) for (int c = 0; c < 2; c++) begin
        a = corners[i]; b = corners[j]; cin = c[0]; s = 4'(op);
        #1 expect_op(alu_op_e'(op));
      end
    // Random operands.
    repeat (4000) begin
      a = 16'($urandom); b = 16'($urandom); cin = 1'($urandom);
      s = 4'($urandom_range(0, int'(ALU_PASS)));
      #1 expect_op(alu_op_e'(s));
    end
    // 4-bit ALU, every operand pair, operation and carry.
    for (int op = 0; op <= int'(ALU_PASS); op++)
      for (int i = 0; i < 16; i++) for (int j = 0; j < 16; j++) for (int c = 0; c < 2; c++) begin
        int x, v, ci, full;
        logic [3:0] r;
        bit lg;
        a4 = 4'(i); b4 = 4'(j); cin = c[0]; s = 4'(op);
        lg = 0; x = i; v = j; ci = 0;
        case (alu_op_e'(op))
          ALU_ADD:  ;
          ALU_ADC:  ci = c;
          ALU_SUB:  begin v = 15 - j; ci = 1; end
          ALU_SBC:  begin v = 15 - j; ci = 1 - c; end
          ALU_NEG:  begin x = 0; v = 15 - j; ci = 1; end
          ALU_INC:  begin x = 0; ci = 1; end
          ALU_PASS: x = 0;
          default:  lg = 1;
        endcase
        full = x + v + ci;
        r = 4'(full);
        if (lg) case (alu_op_e'(op))
          ALU_AND: r = a4 & b4;
          ALU_OR:  r = a4 | b4;
          ALU_XOR: r = a4 ^ b4;
          default: r = ~b4;
        endcase
        #1 checks++;
        if (y4 !== r || flags4.c !== (lg ? 1'b0 : 1'(full >> 4)) || flags4.z !== (r == 0) ||
            flags4.h !== flags4.c) begin
          failures++;
          if (failures < 10) $display("FAIL 4-bit op=%0d a=%h b=%h cin=%b y=%h", op, a4, b4, cin, y4);
        end
      end
    // Known values.
    a = 16'd5; b = 16'd3; cin = 0; s = ALU_SUB; #1;
    checks++; if (y !== 16'd2 || !flags.c) failures++;
    a = 16'd3; b = 16'd5; s = ALU_SUB; #1;
    checks++; if (y !== 16'hfffe || flags.c || !flags.s) failures++;
    a = 16'h7fff; b = 16'd1; s = ALU_ADD; #1;
    checks++; if (y !== 16'h8000 || !flags.o || !flags.h) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
