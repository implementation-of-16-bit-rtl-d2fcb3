// cpu: 16-bit teaching processor with a single internal data bus, run by an
// FSM control unit.
//
// Units: register file R0..R7 (regarray), OpReg, InstrReg and AddrReg
// (biregister), OutReg, Shftreg and the program counter (triregister), the
// one-adder ALU, the shifter, the comparator and the control unit. They all
// meet on one 16-bit internal bus. In the design this bus is tri-state; here
// every driver outputs 0 unless enabled and the bus is the OR of all drivers,
// which behaves the same while at most one driver is enabled (the control
// unit asserts this). ALU and comparator take OpReg as their first operand
// and the bus as their second; the shifter takes the bus.
//
// External interface (one memory for program and data, 16-bit words):
//   addr     AddrReg contents
//   vma      the address is valid, an access is requested
//   rw       0 read, 1 write
//   ready    memory has completed the access (read data valid on data_in,
//            or write data taken from data_out) in this cycle
//   data_in  read data; data_out/data_oe write data and its enable, the
//            two-state split of the bidirectional data bus
// Debug outputs expose the PC, the instruction register, the PSW, the
// internal bus and the OpReg, OutReg and Shftreg contents, in the spirit of a
// processor whose every internal signal is visible.
// Reset is synchronous and active high; execution starts at address 0.
// An instruction takes 3 fetch cycles plus 1 to 3 execute cycles, plus one
// cycle for every cycle the memory holds READY low.
module cpu
  import cpu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic            ready,
  input  logic [XLEN-1:0] data_in,
  output logic [XLEN-1:0] data_out,
  output logic            data_oe,
  output logic [XLEN-1:0] addr,
  output logic            vma,
  output logic            rw,
  output logic            halted,
  output logic [XLEN-1:0] dbg_pc,
  output logic [XLEN-1:0] dbg_ir,
  output psw_t            dbg_psw,
  output logic [XLEN-1:0] dbg_bus,
  output logic [XLEN-1:0] dbg_opreg,
  output logic [XLEN-1:0] dbg_outreg,
  output logic [XLEN-1:0] dbg_shftreg
);

  ctrl_t           ctrl;
  psw_t            psw, alu_flags;
  logic [XLEN-1:0] bus;
  logic [XLEN-1:0] reg_y, out_y, shft_y, pc_y, imm_y, mem_y;
  logic [XLEN-1:0] opreg_q, instr_q, alu_y, shift_y;
  logic [XLEN-1:0] pc_q;
  logic            comp_y;

  // Internal data bus.
  assign imm_y = ctrl.imm_en ? ctrl.imm : '0;
  assign mem_y = ctrl.mem_en ? data_in  : '0;
  assign bus   = reg_y | out_y | shft_y | pc_y | imm_y | mem_y;

  regarray #(.WIDTH(XLEN), .DEPTH(NREG)) u_regs (
    .clk, .rst, .a(bus), .sel(ctrl.reg_sel), .we(ctrl.reg_we),
    .en(ctrl.reg_en), .y(reg_y)
  );

  biregister #(.WIDTH(XLEN)) u_opreg (
    .clk, .rst, .ld(ctrl.opreg_ld), .a(bus), .q(opreg_q)
  );

  biregister #(.WIDTH(XLEN)) u_instrreg (
    .clk, .rst, .ld(ctrl.instr_ld), .a(bus), .q(instr_q)
  );

  biregister #(.WIDTH(XLEN)) u_addrreg (
    .clk, .rst, .ld(ctrl.addr_ld), .a(bus), .q(addr)
  );

  alu #(.WIDTH(XLEN)) u_alu (
    .a(opreg_q), .b(bus), .s(ctrl.alu_sel), .cin(psw.c),
    .y(alu_y), .flags(alu_flags)
  );

  triregister #(.WIDTH(XLEN)) u_outreg (
    .clk, .rst, .ld(ctrl.out_ld), .en(ctrl.out_en), .a(alu_y),
    .y(out_y), .q(dbg_outreg)
  );

  shifter #(.WIDTH(XLEN)) u_shifter (
    .a(bus), .s(ctrl.shift_sel), .y(shift_y)
  );

  triregister #(.WIDTH(XLEN)) u_shftreg (
    .clk, .rst, .ld(ctrl.shft_ld), .en(ctrl.shft_en), .a(shift_y),
    .y(shft_y), .q(dbg_shftreg)
  );

  triregister #(.WIDTH(XLEN)) u_progcntr (
    .clk, .rst, .ld(ctrl.pc_ld), .en(ctrl.pc_en), .a(bus),
    .y(pc_y), .q(pc_q)
  );

  comparator #(.WIDTH(XLEN)) u_comp (
    .a(opreg_q), .b(bus), .s(ctrl.comp_sel), .y(comp_y)
  );

  control_unit u_ctrl (
    .clk, .rst, .ready, .instr(instr_q), .alu_flags, .comp_y,
    .ctrl, .psw, .halted
  );

  assign vma      = ctrl.vma;
  assign rw       = ctrl.rw;
  assign data_oe  = ctrl.data_oe;
  assign data_out = bus;

  assign dbg_pc  = pc_q;
  assign dbg_ir  = instr_q;
  assign dbg_psw = psw;
  assign dbg_bus = bus;
  assign dbg_opreg = opreg_q;

endmodule
