// mips_pkg: types and constants shared by the MIPS-lite single-cycle CPU.
//
// It holds the instruction field layout of the three 32-bit MIPS formats
// (R-type: op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0];
// I-type: op rs rt imm16[15:0]; J-type: op target[25:0]), the opcode and
// funct values of the six MIPS-lite instructions (addu, subu, ori, lw, sw,
// beq), the ALU operation code ALUctr, and the bundle of control points
// that the controller drives into the datapath.
//
// The field positions are those of the MIPS formats. The numeric opcode and
// funct values are the standard MIPS encodings; the ALUctr encoding and the
// grouping of control points into one struct are choices of this design.
package mips_pkg;

  localparam int unsigned XLEN    = 32;  // data path and instruction width
  localparam int unsigned NREGS   = 32;  // general purpose registers
  localparam int unsigned REG_AW  = 5;   // register specifier width

  // Opcodes (instr[31:26])
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_LW    = 6'b100011;
  localparam logic [5:0] OP_SW    = 6'b101011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;

  // funct values of the R-type instructions (instr[5:0])
  localparam logic [5:0] FN_ADDU  = 6'b100001;
  localparam logic [5:0] FN_SUBU  = 6'b100011;

  // ALU operations: add, subtract and OR serve MIPS-lite; AND and
  // set-less-than complete the ALU for the rest of MIPS.
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } alu_ctr_e;

  // Control points of the single-cycle datapath.
  typedef struct packed {
    logic     npc_sel;     // 1: instruction is a branch (taken when Equal)
    logic     reg_wr;      // write the register file
    logic     reg_dst;     // 1: destination is rd, 0: rt
    logic     ext_op;      // 1: sign-extend imm16, 0: zero-extend
    logic     alu_src;     // 1: ALU B input is the extended immediate, 0: busB
    alu_ctr_e alu_ctr;     // ALU operation
    logic     mem_wr;      // write the data memory
    logic     mem_to_reg;  // 1: register write data from memory, 0: from ALU
  } ctrl_t;

  // Instruction fields
  function automatic logic [5:0] f_op(input logic [31:0] i);     return i[31:26]; endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] i);     return i[25:21]; endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] i);     return i[20:16]; endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] i);     return i[15:11]; endfunction
  function automatic logic [5:0] f_funct(input logic [31:0] i);  return i[5:0];   endfunction
  function automatic logic [15:0] f_imm16(input logic [31:0] i); return i[15:0];  endfunction

endpackage
