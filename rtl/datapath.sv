// datapath: the execute part of the single-cycle MIPS-lite CPU: register
// file, extender, ALU, data memory and the RegDst, ALUSrc and MemtoReg
// multiplexers.
//
// Ra = rs and Rb = rt are always read. The RegDst multiplexer picks the
// register written, rd for R-type and rt for I-type. The ALUSrc multiplexer
// gives the ALU either busB or the extended imm16. The ALU result is the
// register write value, the data memory address of lw/sw, or, for beq, the
// difference whose Zero flag is the branch condition `equal`. The data
// memory is written from busB (R[rt]) for sw, and the MemtoReg multiplexer
// returns memory data instead of the ALU result for lw.
//
// One instruction per clock: everything is combinational from the
// instruction to the register file and memory inputs, and both are written
// at the rising clock edge. The connections are those of the standard MIPS
// single-cycle datapath, including which multiplexer input (0 / 1) carries
// what. The
// data memory size is this design's choice. The ALU overflow output is not
// used, as addu and subu ignore overflow.
module datapath
  import mips_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] instr,
  input  ctrl_t       ctrl,
  output logic        equal,
  // observation of the state updates made this cycle
  output logic        rf_we,
  output logic [4:0]  rf_waddr,
  output logic [31:0] rf_wdata,
  output logic        dm_we,
  output logic [31:0] dm_addr,
  output logic [31:0] dm_wdata
);

  logic [4:0]  rw;
  logic [31:0] bus_a, bus_b, bus_w;
  logic [31:0] imm32, alu_b, alu_out, mem_out;
  logic        alu_ovf;

  mux2 #(.N(5)) u_regdst_mux (
    .a  (f_rt(instr)),
    .b  (f_rd(instr)),
    .sel(ctrl.reg_dst),
    .y  (rw)
  );

  regfile u_rf (
    .clk         (clk),
    .write_enable(ctrl.reg_wr),
    .ra          (f_rs(instr)),
    .rb          (f_rt(instr)),
    .rw          (rw),
    .bus_w       (bus_w),
    .bus_a       (bus_a),
    .bus_b       (bus_b)
  );

  extender u_ext (
    .imm16 (f_imm16(instr)),
    .ext_op(ctrl.ext_op),
    .imm32 (imm32)
  );

  mux2 #(.N(32)) u_alusrc_mux (
    .a  (bus_b),
    .b  (imm32),
    .sel(ctrl.alu_src),
    .y  (alu_b)
  );

  alu #(.N(32)) u_alu (
    .a       (bus_a),
    .b       (alu_b),
    .alu_ctr (ctrl.alu_ctr),
    .result  (alu_out),
    .zero    (equal),
    .overflow(alu_ovf)
  );

  ideal_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk         (clk),
    .write_enable(ctrl.mem_wr),
    .addr        (alu_out),
    .data_in     (bus_b),
    .data_out    (mem_out)
  );

  mux2 #(.N(32)) u_memtoreg_mux (
    .a  (alu_out),
    .b  (mem_out),
    .sel(ctrl.mem_to_reg),
    .y  (bus_w)
  );

  assign rf_we    = ctrl.reg_wr;
  assign rf_waddr = rw;
  assign rf_wdata = bus_w;
  assign dm_we    = ctrl.mem_wr;
  assign dm_addr  = alu_out;
  assign dm_wdata = bus_b;

endmodule
