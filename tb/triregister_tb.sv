// triregister_tb: self-checking test of the bus-driving register.
//
// Random loads and output enables; q must track the stored value, y must show
// it only while en is high and be 0 (bus released) otherwise.
module triregister_tb;
  localparam int W = 16;
  logic         clk = 0, rst, ld, en;
  logic [W-1:0] a, y, q, model;
  int checks = 0, failures = 0;

  triregister #(.WIDTH(W)) dut (.clk, .rst, .ld, .en, .a, .y, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 1; en = 1; a = 16'h1234;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0; ld = 0; model = '0;
    checks++; if (q !== '0 || y !== '0) failures++;
    repeat (3000) begin
      @(negedge clk);
      ld = 1'($urandom); en = 1'($urandom); a = W'($urandom);
      #1 checks++;
      if (y !== (en ? model : '0)) failures++;
      @(posedge clk); if (ld) model = a;
      #1 checks++;
      if (q !== model || y !== (en ? model : '0)) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h y=%h en=%b expected %h", q, y, en, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
