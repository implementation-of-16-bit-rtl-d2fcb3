// regarray_tb: self-checking test of the 8 x 16-bit register file.
//
// Random writes and reads against a shadow array: a write must land only in
// the selected register, after the clock edge; the output must be 0 while en
// is low; reset clears every register.
module regarray_tb;
  localparam int W = 16, D = 8;
  logic         clk = 0, rst;
  logic [W-1:0] a, y;
  logic [2:0]   sel;
  logic         we, en;
  logic [W-1:0] shadow [D];
  int checks = 0, failures = 0;

  regarray #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst, .a, .sel, .we, .en, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] exp, input string what);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%0d y=%h expected %h", what, sel, y, exp);
    end
  endtask

  initial begin
    rst = 1; we = 0; en = 0; a = '0; sel = '0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int i = 0; i < D; i++) shadow[i] = '0;
    en = 1;
    for (int i = 0; i < D; i++) begin sel = 3'(i); #1 check('0, "after reset"); end
    repeat (3000) begin
      @(negedge clk);
      sel = 3'($urandom); a = W'($urandom); we = 1'($urandom); en = 1'($urandom);
      #1 check(en ? shadow[sel] : '0, "read before edge");
      @(posedge clk);
      if (we) shadow[sel] = a;
      #1 check(en ? shadow[sel] : '0, "read after edge");
    end
    @(negedge clk); we = 0; en = 1;
    for (int i = 0; i < D; i++) begin sel = 3'(i); #1 check(shadow[i], "final"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
