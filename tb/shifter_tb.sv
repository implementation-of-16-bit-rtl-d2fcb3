// shifter_tb: self-checking test of the shift/rotate unit.
//
// Applies every select code to corner and random operands and compares with
// results built here bit by bit (not with the shift operators the unit uses).
module shifter_tb;
  import cpu_pkg::*;

  localparam int W = 16;
  logic [W-1:0] a, y, e;
  logic [2:0]   s;
  int checks = 0, failures = 0;

  shifter #(.WIDTH(W)) dut (.a, .s, .y);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a = (n < 4) ? W'(n * 16'h5555) : W'($urandom);
      for (int k = 0; k < 8; k++) begin
        s = 3'(k);
        for (int i = 0; i < W; i++) begin
          case (k)
            1: e[i] = (i == 0)   ? 1'b0     : a[i-1];
            2: e[i] = (i == W-1) ? 1'b0     : a[i+1];
            3: e[i] = (i == 0)   ? a[W-1]   : a[i-1];
            4: e[i] = (i == W-1) ? a[0]     : a[i+1];
            default: e[i] = a[i];
          endcase
        end
        #1;
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d a=%h y=%h expected %h", k, a, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
