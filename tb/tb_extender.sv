// tb_extender: self-checking test of the immediate extender: zero-extension
// (ext_op = 0) and sign-extension (ext_op = 1) of random and corner imm16.
module tb_extender;
  logic [15:0] imm;
  logic        ext_op;
  logic [31:0] out;
  int checks = 0, failures = 0;

  extender dut (.imm16(imm), .ext_op(ext_op), .imm32(out));

  task automatic check_one(input logic [15:0] x, input logic e);
    logic [31:0] exp;
    imm = x; ext_op = e; #1;
    exp = e ? 32'($signed(x)) : {16'h0, x};
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL imm=%h ext_op=%b out=%h exp=%h", x, e, out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'h8000, 0); check_one(16'h8000, 1);
    check_one(16'h7fff, 0); check_one(16'h7fff, 1);
    check_one(16'hffff, 0); check_one(16'hffff, 1);
    for (int i = 0; i < 500; i++) check_one(16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
