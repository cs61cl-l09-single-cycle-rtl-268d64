// tb_walkthrough: runs the classic single-cycle datapath walkthrough
// instructions on the CPU at its default sizes and checks each result:
//
//   addu $3, $1, $2      R[3] = R[1] + R[2]           (no memory access)
//   sw   $3, 17($1)      Mem[R[1] + 17] = R[3]        (no register write)
//   lw   $4, 17($1)      R[4] = Mem[R[1] + 17]        (uses all five steps)
//
// R[1] is set to 3 so that R[1] + 17 = 20 is a word address. Each
// instruction must finish in exactly one clock cycle: the test checks the
// PC after every edge and the register and memory contents after each one.
module tb_walkthrough;
  import mips_asm_pkg::*;
  logic        clk = 0, rst, ld_we;
  logic [31:0] ld_addr, ld_data;
  logic [31:0] pc, instr, dm_addr, dm_wdata, rf_wdata;
  logic        rf_we, dm_we;
  logic [4:0]  rf_waddr;
  logic [31:0] prog [8];
  int checks = 0, failures = 0;

  single_cycle_cpu dut (
    .clk(clk), .rst(rst), .imem_load_we(ld_we), .imem_load_addr(ld_addr), .imem_load_data(ld_data),
    .pc(pc), .instr(instr), .rf_we(rf_we), .rf_waddr(rf_waddr), .rf_wdata(rf_wdata),
    .dm_we(dm_we), .dm_addr(dm_addr), .dm_wdata(dm_wdata));

  always #5 clk = ~clk;

  task automatic expect32(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h expected %h", what, got, exp); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prog[0] = a_ori(1, 0, 3);        // r1 = 3
    prog[1] = a_ori(2, 0, 1000);     // r2 = 1000
    prog[2] = a_addu(3, 1, 2);       // add walkthrough
    prog[3] = a_sw(3, 1, 17);        // sw walkthrough
    prog[4] = a_lw(4, 1, 17);        // lw walkthrough
    prog[5] = a_beq(0, 0, -1);       // stop here
    prog[6] = '0;
    prog[7] = '0;
    rst = 1; ld_we = 0; ld_addr = '0; ld_data = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 8; i++) begin
      ld_we = 1; ld_addr = 32'(4 * i); ld_data = prog[i];
      @(posedge clk); #1;
    end
    ld_we = 0;
    dut.u_dp.u_dmem.mem[5] = 32'hdead_beef;
    rst = 0; #1;
    expect32("pc at start", pc, 32'h0);
    @(posedge clk); #1;                           // ori r1
    @(posedge clk); #1;                           // ori r2
    expect32("pc after two cycles", pc, 32'h8);
    expect32("r1", dut.u_dp.u_rf.regs[1], 32'd3);
    expect32("r2", dut.u_dp.u_rf.regs[2], 32'd1000);
    checks++; if (dm_we !== 1'b0 && instr == prog[2]) begin failures++; $display("FAIL addu writes memory"); end
    @(posedge clk); #1;                           // addu
    expect32("r3 = r1 + r2", dut.u_dp.u_rf.regs[3], 32'd1003);
    expect32("pc after addu", pc, 32'hc);
    checks++; if (rf_we !== 1'b0) begin failures++; $display("FAIL sw writes a register"); end
    expect32("sw address r1 + 17", dm_addr, 32'd20);
    @(posedge clk); #1;                           // sw
    expect32("Mem[20] = r3", dut.u_dp.u_dmem.mem[5], 32'd1003);
    expect32("pc after sw", pc, 32'h10);
    @(posedge clk); #1;                           // lw
    expect32("r4 = Mem[20]", dut.u_dp.u_rf.regs[4], 32'd1003);
    expect32("pc after lw", pc, 32'h14);
    repeat (3) @(posedge clk); #1;
    expect32("pc held by branch to itself", pc, 32'h14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
