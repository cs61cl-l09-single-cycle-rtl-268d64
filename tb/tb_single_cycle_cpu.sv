// tb_single_cycle_cpu: end-to-end test of the MIPS-lite single-cycle CPU at
// its default sizes.
//
// The test assembles a program into the instruction memory: a counted loop
// (subu and a backward beq), stores followed by loads of the same words,
// then several hundred random addu/subu/ori/lw/sw/beq instructions, ending
// in a branch to itself. A reference model executes the same program. Every
// clock cycle the PC, the instruction, the register write and the memory
// write that the CPU is about to commit are compared with the model, so
// the test also checks that each instruction takes exactly one cycle. At
// the end all registers and data memory words are compared. Each mechanism
// (each instruction, taken and untaken branches, a backward branch, a write
// to register 0, a load of a word stored earlier) is counted and must occur.
module tb_single_cycle_cpu;
  import mips_asm_pkg::*;
  localparam int IWORDS = 1024;   // default instruction memory size
  localparam int DWORDS = 1024;   // default data memory size
  localparam int NRAND  = 600;

  logic        clk = 0, rst, ld_we;
  logic [31:0] ld_addr, ld_data;
  logic [31:0] pc, instr, dm_addr, dm_wdata, rf_wdata;
  logic        rf_we, dm_we;
  logic [4:0]  rf_waddr;

  logic [31:0] prog [IWORDS];
  logic [31:0] m_regs [32];
  logic [31:0] m_mem [];
  logic [31:0] m_pc;
  int checks = 0, failures = 0;
  int n_addu = 0, n_subu = 0, n_ori = 0, n_lw = 0, n_sw = 0;
  int n_taken = 0, n_not_taken = 0, n_backward = 0, n_r0_write = 0, n_ld_after_st = 0;
  int cycles = 0, retired = 0;
  bit stored [];

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .imem_load_we(ld_we), .imem_load_addr(ld_addr), .imem_load_data(ld_data),
    .pc(pc), .instr(instr),
    .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic build_program(output int halt_idx);
    int n = 0;
    for (int i = 0; i < IWORDS; i++) prog[i] = '0;
    prog[n++] = a_ori(1, 0, 5);         // r1 = 5 (loop count)
    prog[n++] = a_ori(2, 0, 1);         // r2 = 1
    prog[n++] = a_subu(1, 1, 2);        // loop: r1 = r1 - r2
    prog[n++] = a_beq(1, 0, 1);         // leave the loop when r1 == 0
    prog[n++] = a_beq(0, 0, -3);        // back to loop
    prog[n++] = a_ori(3, 0, 16'h8000);  // zero-extended immediate
    prog[n++] = a_ori(4, 0, 64);        // base address
    prog[n++] = a_sw(3, 4, -4);         // negative offset
    prog[n++] = a_sw(2, 4, 8);
    prog[n++] = a_lw(5, 4, -4);         // reads the word stored above
    prog[n++] = a_lw(6, 4, 8);
    prog[n++] = a_addu(7, 5, 6);
    prog[n++] = a_addu(0, 5, 6);        // write to r0 is discarded
    // random section
    for (int k = 0; k < NRAND; k++) begin
      int kind = $urandom % 6;
      int rs = 1 + $urandom % 31, rt = 1 + $urandom % 31, rd = $urandom % 32;
      case (kind)
        0: prog[n++] = a_addu(rd, rs, rt);
        1: prog[n++] = a_subu(rd, rs, rt);
        2: prog[n++] = a_ori(rt, rs, $urandom % 65536);
        3: prog[n++] = a_lw(rt, rs, 4 * (int'($urandom % 64) - 32));
        4: prog[n++] = a_sw(rt, rs, 4 * (int'($urandom % 64) - 32));
        default: begin
          if ($urandom % 2) rt = rs;                 // equal registers: taken
          prog[n++] = a_beq(rs, rt, $urandom % 4);   // short forward skip
        end
      endcase
    end
    halt_idx = n;
    prog[n++] = a_beq(0, 0, -1);        // branch to itself
  endtask

  initial begin
    effect_t e;
    int halt_idx;
    build_program(halt_idx);
    m_mem = new[DWORDS];
    stored = new[DWORDS];
    for (int i = 0; i < DWORDS; i++) begin m_mem[i] = $urandom; dut.u_dp.u_dmem.mem[i] = m_mem[i]; end
    m_regs[0] = '0;
    for (int i = 1; i < 32; i++) begin m_regs[i] = $urandom; dut.u_dp.u_rf.regs[i] = m_regs[i]; end

    // load the program through the load port while in reset
    rst = 1; ld_we = 0; ld_addr = '0; ld_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < IWORDS; i++) begin
      ld_we = 1; ld_addr = 32'(4 * i); ld_data = prog[i];
      @(posedge clk); #1;
    end
    ld_we = 0;
    @(posedge clk); #1;
    rst = 0;
    #1;
    m_pc = 32'h0;
    while (1) begin
      // compare what the CPU will commit at the next edge
      checks++;
      if (pc !== m_pc || instr !== prog[m_pc[11:2]]) begin
        failures++;
        $display("FAIL cycle %0d pc=%h exp %h instr=%h", cycles, pc, m_pc, instr);
        break;
      end
      if (m_pc[11:2] == 10'(halt_idx)) break;
      begin
        logic [5:0]  op;
        logic [31:0] ea;
        int          widx;
        op = instr[31:26];
        ea = m_regs[instr[25:21]] + {{16{instr[15]}}, instr[15:0]};
        widx = word_index(ea, DWORDS);
        if (op == 6'h23 && stored[widx]) n_ld_after_st++;
        if (op == 6'h2b) stored[widx] = 1;
        if (op == 6'h00 && instr[5:0] == 6'h21) n_addu++;
        if (op == 6'h00 && instr[5:0] == 6'h23) n_subu++;
        if (op == 6'h0d) n_ori++;
        if (op == 6'h23) n_lw++;
        if (op == 6'h2b) n_sw++;
      end
      e = step(instr, m_pc, m_regs, m_mem, DWORDS);
      if (e.is_beq) begin
        if (e.taken) n_taken++; else n_not_taken++;
        if (e.taken && e.next_pc < m_pc) n_backward++;
      end
      if (e.rf_we && e.rf_waddr == 0) n_r0_write++;
      checks++;
      if (rf_we !== e.rf_we || (e.rf_we && (rf_waddr !== e.rf_waddr || rf_wdata !== e.rf_wdata)) ||
          dm_we !== e.dm_we || (e.dm_we && (dm_addr !== e.dm_addr || dm_wdata !== e.dm_wdata))) begin
        failures++;
        $display("FAIL pc=%h instr=%h rf %b %0d %h (exp %b %0d %h) dm %b %h %h (exp %b %h %h)",
                 pc, instr, rf_we, rf_waddr, rf_wdata, e.rf_we, e.rf_waddr, e.rf_wdata,
                 dm_we, dm_addr, dm_wdata, e.dm_we, e.dm_addr, e.dm_wdata);
      end
      m_pc = e.next_pc;
      @(posedge clk); #1;
      cycles++;
      retired++;
    end
    // the branch to itself must hold the PC
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pc !== 32'(halt_idx * 4)) begin failures++; $display("FAIL halt loop pc=%h", pc); end
    // one instruction per clock cycle
    checks++;
    if (cycles != retired) begin failures++; $display("FAIL cycles %0d retired %0d", cycles, retired); end
    // final architectural state
    for (int i = 0; i < 32; i++) begin
      checks++;
      if ((i == 0 ? 32'h0 : dut.u_dp.u_rf.regs[i]) !== m_regs[i]) begin failures++; $display("FAIL final r%0d", i); end
    end
    for (int i = 0; i < DWORDS; i++) begin
      checks++;
      if (dut.u_dp.u_dmem.mem[i] !== m_mem[i]) begin failures++; $display("FAIL final mem[%0d]", i); end
    end
    $display("retired %0d instructions in %0d cycles", retired, cycles);
    $display("addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not_taken=%0d backward=%0d r0_write=%0d load_after_store=%0d",
             n_addu, n_subu, n_ori, n_lw, n_sw, n_taken, n_not_taken, n_backward, n_r0_write, n_ld_after_st);
    if (n_addu == 0 || n_subu == 0 || n_ori == 0 || n_lw == 0 || n_sw == 0 || n_taken == 0 ||
        n_not_taken == 0 || n_backward == 0 || n_r0_write == 0 || n_ld_after_st == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
