// comparator_tb: self-checking test of the magnitude comparator.
//
// Every relation code on equal, adjacent, extreme and random operand pairs,
// checked against a reference built from the sign of the integer difference.
module comparator_tb;
  import cpu_pkg::*;

  localparam int W = 16;
  logic [W-1:0] a, b;
  logic [2:0]   s;
  logic         y, e;
  int checks = 0, failures = 0;

  comparator #(.WIDTH(W)) dut (.a, .b, .s, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int n = 0; n < 3000; n++) begin
      case (n % 4)
        0: begin a = W'($urandom); b = a; end
        1: begin a = W'($urandom); b = a + 1; end
        2: begin a = W'($urandom); b = a - 1; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      if (n == 1) begin a = 16'hffff; b = 16'h0000; end
      d = int'(a) - int'(b);
      for (int k = 0; k < 8; k++) begin
        s = 3'(k);
        case (k)
          0: e = (d == 0);
          1: e = (d != 0);
          2: e = (d > 0);
          3: e = (d >= 0);
          4: e = (d < 0);
          5: e = (d <= 0);
          default: e = 1'b0;
        endcase
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d a=%h b=%h y=%b", k, a, b, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
