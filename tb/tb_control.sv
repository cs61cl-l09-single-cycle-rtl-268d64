// tb_control: self-checking test of the main decoder. Every MIPS-lite
// instruction is decoded and all control points are compared with the
// expected settings, written here from each instruction's register transfer.
// Opcodes and funct values outside MIPS-lite must change no state.
module tb_control;
  import mips_pkg::*;
  logic [5:0] op, funct;
  ctrl_t      c;
  int checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(c));

  // expected: {npc_sel, reg_wr, reg_dst, ext_op(or -), alu_src, alu_ctr, mem_wr, mem_to_reg}
  task automatic expect_ctrl(input string nm, input logic [5:0] xop, input logic [5:0] xfn,
                             input logic npc, input logic rwr, input logic rdst, input logic ext,
                             input logic ext_care, input logic asrc, input alu_ctr_e actr,
                             input logic actr_care, input logic mwr, input logic m2r, input logic m2r_care);
    op = xop; funct = xfn; #1;
    checks++;
    if (c.npc_sel !== npc || c.reg_wr !== rwr || c.mem_wr !== mwr ||
        (rwr && c.reg_dst !== rdst) || (ext_care && c.ext_op !== ext) ||
        ((rwr || mwr || npc) && c.alu_src !== asrc) ||
        (actr_care && c.alu_ctr !== actr) || (m2r_care && c.mem_to_reg !== m2r)) begin
      failures++;
      $display("FAIL %s: got npc=%b rwr=%b rdst=%b ext=%b asrc=%b actr=%0d mwr=%b m2r=%b", nm,
               c.npc_sel, c.reg_wr, c.reg_dst, c.ext_op, c.alu_src, c.alu_ctr, c.mem_wr, c.mem_to_reg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //          name    op       funct   npc rwr rdst ext e? asrc actr    a? mwr m2r m?
    expect_ctrl("addu", 6'h00, 6'h21,   0,  1,  1,   0,  0, 0,   ALU_ADD, 1, 0,  0,  1);
    expect_ctrl("subu", 6'h00, 6'h23,   0,  1,  1,   0,  0, 0,   ALU_SUB, 1, 0,  0,  1);
    expect_ctrl("ori",  6'h0d, 6'h3f,   0,  1,  0,   0,  1, 1,   ALU_OR,  1, 0,  0,  1);
    expect_ctrl("lw",   6'h23, 6'h00,   0,  1,  0,   1,  1, 1,   ALU_ADD, 1, 0,  1,  1);
    expect_ctrl("sw",   6'h2b, 6'h00,   0,  0,  0,   1,  1, 1,   ALU_ADD, 1, 1,  0,  0);
    expect_ctrl("beq",  6'h04, 6'h21,   0 | 1, 0, 0, 1,  0, 0,   ALU_SUB, 1, 0,  0,  0);
    // instructions outside the subset change no state
    for (int f = 0; f < 64; f++)
      if (f != 6'h21 && f != 6'h23)
        expect_ctrl("rtype-other", 6'h00, 6'(f), 0, 0, 0, 0, 0, 0, ALU_ADD, 0, 0, 0, 0);
    for (int o = 1; o < 64; o++)
      if (o != 6'h0d && o != 6'h23 && o != 6'h2b && o != 6'h04)
        expect_ctrl("op-other", 6'(o), 6'($urandom), 0, 0, 0, 0, 0, 0, ALU_ADD, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
