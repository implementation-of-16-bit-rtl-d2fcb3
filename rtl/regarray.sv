// regarray: the CPU's general register file, R0..R7 of 16 bits.
//
// One port, addressed by sel, serves both directions because the registers
// sit on the single internal data bus: on a rising clock edge with we high the
// bus value a is written to register sel; while en is high the selected
// register is driven on y, otherwise y is 0. The CPU combines all bus drivers
// with an OR, so a 0 output plays the part of a released tri-state driver.
// The a/sel/clk/en/y ports follow the register array's port list; the separate
// write enable (instead of using the clock itself as a write strobe) and the
// reset to zero are this design's choices for a single-clock design.
// Timing: write takes effect after the clock edge; read is combinational.
module regarray #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [WIDTH-1:0]         a,
  input  logic [$clog2(DEPTH)-1:0] sel,
  input  logic                     we,
  input  logic                     en,
  output logic [WIDTH-1:0]         y
);

  logic [WIDTH-1:0] regs [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) regs[i] <= '0;
    end else if (we) begin
      regs[sel] <= a;
    end
  end

  assign y = en ? regs[sel] : '0;

endmodule
