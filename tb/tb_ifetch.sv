// tb_ifetch: self-checking test of the instruction fetch unit. The
// instruction memory is filled with random words; each cycle npc_sel and
// equal are driven at random, and the fetched word and the PC sequence
// (PC + 4, or PC + 4 + SignExt(imm16) * 4 for a taken branch) are compared
// with a model. The memory is filled through the load port during reset;
// the test also checks the reset value of the PC and that the load port
// writes nothing once reset is released.
module tb_ifetch;
  localparam int          WORDS = 64;
  localparam logic [31:0] RPC   = 32'h0000_0010;
  logic        clk = 0, rst, npc_sel, equal, load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] pc, instr, model_pc;
  logic [31:0] words [WORDS];
  int checks = 0, failures = 0, n_taken = 0, n_seq = 0;

  ifetch #(.IMEM_WORDS(WORDS), .RESET_PC(RPC)) dut (
    .clk(clk), .rst(rst), .npc_sel(npc_sel), .equal(equal), .pc(pc), .instr(instr),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; npc_sel = 0; equal = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int i = 0; i < WORDS; i++) begin
      words[i] = $urandom;
      load_we = 1; load_addr = 32'(4 * i); load_data = words[i];
      @(posedge clk); #1;
    end
    load_we = 0;
    @(posedge clk); #1;
    rst = 0;
    // out of reset the load port must not write
    load_we = 1; load_addr = 32'h0; load_data = ~words[0];
    #1;
    model_pc = RPC;
    for (int i = 0; i < 1000; i++) begin
      checks++;
      if (pc !== model_pc || instr !== words[model_pc[7:2]]) begin
        failures++;
        $display("FAIL cycle %0d pc=%h exp %h instr=%h exp %h", i, pc, model_pc, instr, words[model_pc[7:2]]);
      end
      npc_sel = 1'($urandom); equal = 1'($urandom);
      @(posedge clk);
      if (npc_sel && equal) begin
        model_pc = model_pc + 4 + {{14{instr[15]}}, instr[15:0], 2'b00};
        n_taken++;
      end else begin
        model_pc = model_pc + 4;
        n_seq++;
      end
      #1;
    end
    checks++;
    if (dut.u_imem.mem[0] !== words[0]) begin failures++; $display("FAIL load port wrote out of reset"); end
    if (n_taken == 0 || n_seq == 0) begin failures++; $display("FAIL a next-PC path never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
