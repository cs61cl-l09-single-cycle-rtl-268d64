// control: main decoder of the single-cycle CPU.
//
// From the opcode and funct fields of the current instruction it sets the
// control points of the datapath so that the instruction's register transfer
// happens in one clock cycle:
//
//   instr  RegDst RegWr ALUSrc ExtOp ALUctr MemWr MemtoReg nPC_sel
//   addu     rd     1    busB    -    ADD     0      ALU      0
//   subu     rd     1    busB    -    SUB     0      ALU      0
//   ori      rt     1    imm     0    OR      0      ALU      0
//   lw       rt     1    imm     1    ADD     0      Mem      0
//   sw       -      0    imm     1    ADD     1      -        0
//   beq      -      0    busB    -    SUB     0      -        1
//
// The table is worked out from the register transfer of each instruction.
// The encodings are the standard MIPS ones (mips_pkg). An opcode or funct
// outside MIPS-lite is this design's choice to treat as a no-operation: it
// writes neither registers nor memory and the PC advances by 4.
// Purely combinational.
module control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{npc_sel: 1'b0, reg_wr: 1'b0, reg_dst: 1'b0, ext_op: 1'b0,
             alu_src: 1'b0, alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0};
    unique case (op)
      OP_RTYPE: begin
        if (funct == FN_ADDU || funct == FN_SUBU) begin
          ctrl.reg_dst = 1'b1;
          ctrl.reg_wr  = 1'b1;
          ctrl.alu_ctr = (funct == FN_SUBU) ? ALU_SUB : ALU_ADD;
        end
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.alu_src = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.npc_sel = 1'b1;
        ctrl.ext_op  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
      end
      default: ;
    endcase
  end

endmodule
