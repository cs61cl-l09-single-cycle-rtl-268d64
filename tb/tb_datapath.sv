// tb_datapath: self-checking test of the datapath on its own. The test
// drives each instruction word together with control points it derives
// itself from the instruction's register transfer, then compares the
// register write, the memory write and the Equal flag with the reference
// model before the clock edge that commits them. Registers and data memory
// start from known random contents written into the arrays.
module tb_datapath;
  import mips_pkg::*;
  import mips_asm_pkg::*;
  localparam int WORDS = 64;
  logic        clk = 0;
  logic [31:0] instr;
  ctrl_t       ctrl;
  logic        equal, rf_we, dm_we;
  logic [4:0]  rf_waddr;
  logic [31:0] rf_wdata, dm_addr, dm_wdata;
  logic [31:0] m_regs [32];
  logic [31:0] m_mem [];
  int checks = 0, failures = 0;
  int n_kind [6];

  datapath #(.DMEM_WORDS(WORDS)) dut (
    .clk(clk), .instr(instr), .ctrl(ctrl), .equal(equal),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  function automatic ctrl_t ctrl_for(input int kind);
    ctrl_t c = '{npc_sel: 0, reg_wr: 0, reg_dst: 0, ext_op: 0, alu_src: 0,
                 alu_ctr: ALU_ADD, mem_wr: 0, mem_to_reg: 0};
    case (kind)
      0: begin c.reg_wr = 1; c.reg_dst = 1; end                                   // addu
      1: begin c.reg_wr = 1; c.reg_dst = 1; c.alu_ctr = ALU_SUB; end              // subu
      2: begin c.reg_wr = 1; c.alu_src = 1; c.alu_ctr = ALU_OR; end               // ori
      3: begin c.reg_wr = 1; c.alu_src = 1; c.ext_op = 1; c.mem_to_reg = 1; end   // lw
      4: begin c.mem_wr = 1; c.alu_src = 1; c.ext_op = 1; end                     // sw
      default: begin c.npc_sel = 1; c.alu_ctr = ALU_SUB; end                      // beq
    endcase
    return c;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    effect_t e;
    int kind, rs, rt, rd, imm;
    m_mem = new[WORDS];
    m_regs[0] = '0;
    for (int i = 1; i < 32; i++) begin m_regs[i] = $urandom; dut.u_rf.regs[i] = m_regs[i]; end
    for (int i = 0; i < WORDS; i++) begin m_mem[i] = $urandom; dut.u_dmem.mem[i] = m_mem[i]; end
    instr = '0; ctrl = ctrl_for(5);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      kind = $urandom % 6;
      rs = $urandom % 32; rt = $urandom % 32; rd = $urandom % 32; imm = $urandom % 65536;
      if (kind == 5 && ($urandom % 2)) rt = rs;  // make beq equal often
      case (kind)
        0: instr = a_addu(rd, rs, rt);
        1: instr = a_subu(rd, rs, rt);
        2: instr = a_ori(rt, rs, imm);
        3: instr = a_lw(rt, rs, imm);
        4: instr = a_sw(rt, rs, imm);
        default: instr = a_beq(rs, rt, imm);
      endcase
      ctrl = ctrl_for(kind);
      #1;
      e = step(instr, 32'h0, m_regs, m_mem, WORDS);
      n_kind[kind]++;
      checks++;
      if (rf_we !== e.rf_we || (e.rf_we && (rf_waddr !== e.rf_waddr || rf_wdata !== e.rf_wdata)) ||
          dm_we !== e.dm_we || (e.dm_we && (dm_addr !== e.dm_addr || dm_wdata !== e.dm_wdata)) ||
          (e.is_beq && equal !== e.taken)) begin
        failures++;
        $display("FAIL instr=%h rf %b %0d %h (exp %b %0d %h) dm %b %h %h (exp %b %h %h) eq %b exp %b",
                 instr, rf_we, rf_waddr, rf_wdata, e.rf_we, e.rf_waddr, e.rf_wdata,
                 dm_we, dm_addr, dm_wdata, e.dm_we, e.dm_addr, e.dm_wdata, equal, e.taken);
      end
    end
    @(negedge clk);
    ctrl = ctrl_for(5);
    // final state: every register must match the model
    for (int i = 0; i < 32; i++) begin
      instr = a_beq(i, 0, 0); #1;
      checks++;
      if (dut.u_rf.bus_a !== m_regs[i]) begin failures++; $display("FAIL final r%0d", i); end
    end
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (dut.u_dmem.mem[i] !== m_mem[i]) begin failures++; $display("FAIL final mem[%0d]", i); end
    end
    foreach (n_kind[k]) if (n_kind[k] == 0) begin failures++; $display("FAIL kind %0d never ran", k); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
