// biregister: plain bus-loaded register (OpReg, InstrReg and AddrReg).
//
// On a rising clock edge with ld high it stores a; its output q is always
// visible to the unit it feeds (the ALU, the control unit or the address
// bus). Cleared by the synchronous reset. The a/clk ports follow the
// register's port list; the load enable and reset are this design's choices.
module biregister #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ld,
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= a;
  end

endmodule
