// ifetch: instruction fetch unit: the PC register, the instruction memory
// and the next address logic.
//
// Each cycle the instruction memory is read at PC (combinationally) and the
// word goes to the decoder and datapath. At the rising clock edge the PC is
// updated: sequential code takes PC + 4 (byte addressing, 4-byte words); a
// beq whose registers are equal (npc_sel = 1 and equal = 1) takes
// PC + 4 + SignExt(imm16) * 4. The branch offset is the instruction's imm16,
// sign-extended and shifted left by two (the special sign extender for the
// PC). Two adders build the sequential and the branch address and a 2-input
// multiplexer picks one.
//
// This is the standard single-cycle fetch unit and beq transfer. The synchronous
// reset of the PC to RESET_PC and the instruction memory size are this
// design's choices. The CPU never writes the instruction memory. So that a
// program can be placed in it, the unit has a load port of its own design:
// while rst is 1 the memory address comes from load_addr instead of the PC,
// and load_we writes load_data at the rising clock edge. Out of reset the
// load port is ignored.
module ifetch
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1024,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        npc_sel,   // instruction is a branch
  input  logic        equal,     // branch condition R[rs] == R[rt]
  output logic [31:0] pc,
  output logic [31:0] instr,
  // program load port, used only while rst is 1
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data
);

  logic [31:0] pc_plus4;
  logic [31:0] br_offset;
  logic [31:0] br_target;
  logic [31:0] next_pc;
  logic [31:0] imem_addr;
  logic        unused_c0, unused_c1, unused_c2, unused_c3;

  nbit_register #(.N(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk         (clk),
    .rst         (rst),
    .write_enable(1'b1),
    .data_in     (next_pc),
    .data_out    (pc)
  );

  mux2 #(.N(32)) u_load_mux (
    .a  (pc),
    .b  (load_addr),
    .sel(rst),
    .y  (imem_addr)
  );

  ideal_mem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk         (clk),
    .write_enable(rst & load_we),
    .addr        (imem_addr),
    .data_in     (load_data),
    .data_out    (instr)
  );

  // PC + 4
  adder #(.N(32)) u_inc (
    .a             (pc),
    .b             (32'd4),
    .carry_in      (1'b0),
    .sum           (pc_plus4),
    .carry_out     (unused_c0),
    .carry_into_msb(unused_c1)
  );

  // SignExt(imm16) * 4
  assign br_offset = {{14{instr[15]}}, instr[15:0], 2'b00};

  adder #(.N(32)) u_br (
    .a             (pc_plus4),
    .b             (br_offset),
    .carry_in      (1'b0),
    .sum           (br_target),
    .carry_out     (unused_c2),
    .carry_into_msb(unused_c3)
  );

  mux2 #(.N(32)) u_npc_mux (
    .a  (pc_plus4),
    .b  (br_target),
    .sel(npc_sel & equal),
    .y  (next_pc)
  );

endmodule
