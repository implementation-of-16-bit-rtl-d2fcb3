// triregister: register with a bus-driving output (OutReg, Shftreg, PC).
//
// On a rising clock edge with ld high it stores a. Its output y carries the
// stored value only while en is high and is 0 otherwise, so that several
// triregisters can share the internal data bus through an OR, the two-state
// stand-in for the tri-state bus of the design. q shows the stored value at
// all times (the PC uses it as a visible signal). The a/clk/en ports follow
// the register's port list; ld, q and the reset are this design's choices.
module triregister #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic             en,
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= a;
  end

  assign y = en ? q : '0;

endmodule
