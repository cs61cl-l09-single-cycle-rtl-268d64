// tb_alu: self-checking test of the ALU: add, subtract, OR, AND and signed
// set-less-than on corner and random operands, plus the Zero flag (used for
// the beq equality test) and the overflow flag of add/subtract.
module tb_alu;
  import mips_pkg::*;
  logic [31:0] a, b, r;
  alu_ctr_e    op;
  logic        zero, ovf;
  int checks = 0, failures = 0, n_zero = 0;

  alu #(.N(32)) dut (.a(a), .b(b), .alu_ctr(op), .result(r), .zero(zero), .overflow(ovf));

  task automatic check_one(input logic [31:0] xa, input logic [31:0] xb, input alu_ctr_e xop);
    logic [31:0] exp;
    longint      s;
    logic        eo;
    a = xa; b = xb; op = xop; #1;
    eo = 1'b0;
    case (xop)
      ALU_ADD: begin exp = xa + xb; s = longint'($signed(xa)) + longint'($signed(xb)); eo = (s != longint'($signed(exp))); end
      ALU_SUB: begin exp = xa - xb; s = longint'($signed(xa)) - longint'($signed(xb)); eo = (s != longint'($signed(exp))); end
      ALU_OR:  exp = xa | xb;
      ALU_AND: exp = xa & xb;
      ALU_SLT: exp = ($signed(xa) < $signed(xb)) ? 32'd1 : 32'd0;
      default: exp = '0;
    endcase
    if (exp == 0) n_zero++;
    checks++;
    if (r !== exp || zero !== (exp == 0) || ovf !== eo) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h r=%h exp=%h zero=%b ovf=%b/%b", xop.name(), xa, xb, r, exp, zero, ovf, eo);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alu_ctr_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};
    foreach (ops[k]) begin
      check_one(32'h0, 32'h0, ops[k]);
      check_one(32'h7fffffff, 32'h1, ops[k]);
      check_one(32'h80000000, 32'h1, ops[k]);
      check_one(32'hffffffff, 32'h1, ops[k]);
      check_one(32'h12345678, 32'h12345678, ops[k]);
      check_one(32'h1, 32'hffffffff, ops[k]);
      for (int i = 0; i < 400; i++) check_one($urandom, (i % 7 == 0) ? a : $urandom, ops[k]);
    end
    if (n_zero == 0) begin failures++; $display("FAIL zero never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
