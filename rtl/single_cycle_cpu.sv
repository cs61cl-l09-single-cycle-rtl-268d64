// single_cycle_cpu: MIPS-lite processor that completes every instruction in
// one long clock cycle.
//
// It runs the six MIPS-lite instructions addu, subu, ori, lw, sw and beq.
// The instruction fetch unit reads the instruction at PC; the controller
// decodes its op and funct fields into control points; the datapath reads
// rs and rt, computes in the ALU, accesses the data memory and produces the
// value written back. At the rising clock edge the register file, data
// memory and PC are all updated together, so the five steps (fetch, decode
// and register read, execute, memory, register write) all fit inside one
// clock period, whose length is set by the slowest instruction, lw.
//
// Interface: clk and a synchronous active-high rst that sets the PC to
// RESET_PC. The outputs show the PC, the current instruction, and the
// register and memory writes that take effect at the next rising edge;
// they exist to observe the processor. The instruction memory is loaded
// through imem_load_we/imem_load_addr/imem_load_data (byte address, one
// word per clock edge) while rst is 1; the CPU itself never writes it.
// Registers and data memory are not reset.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter int unsigned DMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        dm_we,
  output logic [31:0] dm_addr,
  output logic [31:0] dm_wdata
);

  ctrl_t ctrl;
  logic  equal;

  ifetch #(.IMEM_WORDS(IMEM_WORDS), .RESET_PC(RESET_PC)) u_ifetch (
    .clk    (clk),
    .rst    (rst),
    .npc_sel(ctrl.npc_sel),
    .equal  (equal),
    .pc     (pc),
    .instr  (instr),
    .load_we  (imem_load_we),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data)
  );

  control u_ctrl (
    .op   (f_op(instr)),
    .funct(f_funct(instr)),
    .ctrl (ctrl)
  );

  datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk     (clk),
    .instr   (instr),
    .ctrl    (ctrl),
    .equal   (equal),
    .rf_we   (rf_we),
    .rf_waddr(rf_waddr),
    .rf_wdata(rf_wdata),
    .dm_we   (dm_we),
    .dm_addr (dm_addr),
    .dm_wdata(dm_wdata)
  );

endmodule
