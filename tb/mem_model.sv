// mem_model: behavioural model of the external program/data memory (not
// synthesizable design, testbench only).
//
// 2**AW words of 16 bits. While vma is high it counts the cycles of the
// current access and raises ready once the count reaches wait_cycles; in that
// cycle a read returns mem[addr] on rdata and a write (rw = 1) stores wdata
// at the clock edge. ready is low whenever vma is low. wait_cycles may change
// between accesses, which the CPU testbenches use to insert wait states.
module mem_model #(
  parameter int AW = 16
) (
  input  logic        clk,
  input  logic        vma,
  input  logic        rw,
  input  logic [15:0] addr,
  input  logic [15:0] wdata,
  input  logic [3:0]  wait_cycles,
  output logic        ready,
  output logic [15:0] rdata
);

  logic [15:0] mem [2**AW];
  logic [3:0]  cnt = '0;

  assign ready = vma && (cnt == wait_cycles);
  assign rdata = mem[addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!vma || ready) cnt <= '0;
    else               cnt <= cnt + 1'b1;
    if (vma && ready && rw) mem[addr[AW-1:0]] <= wdata;
  end

endmodule
