// biregister_tb: self-checking test of the load-enabled register.
//
// Random data and load enables; q must follow a only at a clock edge with ld
// high, hold otherwise, and clear on reset.
module biregister_tb;
  localparam int W = 16;
  logic         clk = 0, rst, ld;
  logic [W-1:0] a, q, model;
  int checks = 0, failures = 0;

  biregister #(.WIDTH(W)) dut (.clk, .rst, .ld, .a, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; ld = 1; a = 16'hbeef;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0; ld = 0; model = '0;
    checks++; if (q !== '0) failures++;
    repeat (3000) begin
      @(negedge clk);
      ld = 1'($urandom); a = W'($urandom);
      @(posedge clk); if (ld) model = a;
      #1 checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL q=%h expected %h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
