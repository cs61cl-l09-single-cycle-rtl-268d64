// tb_addsub: self-checking test of the adder-subtractor. Checks the result,
// the carry out and the signed overflow flag for add and subtract against
// integer arithmetic, including the operand pairs that overflow. A second,
// 2-bit instance is checked exhaustively: with 2-bit two's complement
// numbers (-2..1) overflow is easy to enumerate by hand.
module tb_addsub;
  localparam int N = 32;
  logic [N-1:0] a, b, r;
  logic sub, cout, ovf;
  int checks = 0, failures = 0, n_ovf = 0;

  addsub #(.N(N)) dut (.a(a), .b(b), .sub(sub), .result(r), .carry_out(cout), .overflow(ovf));

  logic [1:0] a2, b2, r2;
  logic       sub2, cout2, ovf2;
  addsub #(.N(2)) dut2 (.a(a2), .b(b2), .sub(sub2), .result(r2), .carry_out(cout2), .overflow(ovf2));

  task automatic check_one(input logic [N-1:0] xa, input logic [N-1:0] xb, input logic xs);
    logic [N:0]         full;
    longint             sres;
    logic               exp_ovf;
    a = xa; b = xb; sub = xs; #1;
    if (xs) begin
      full = {1'b0, xa} + {1'b0, ~xb} + 1;
      sres = longint'($signed(xa)) - longint'($signed(xb));
    end else begin
      full = {1'b0, xa} + {1'b0, xb};
      sres = longint'($signed(xa)) + longint'($signed(xb));
    end
    exp_ovf = (sres > 64'sd2147483647) || (sres < -64'sd2147483648);
    if (exp_ovf) n_ovf++;
    checks++;
    if (r !== full[N-1:0] || cout !== full[N] || ovf !== exp_ovf) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%b r=%h cout=%b ovf=%b exp_ovf=%b", xa, xb, xs, r, cout, ovf, exp_ovf);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(32'h7fffffff, 32'h00000001, 0);  // positive overflow
    check_one(32'h80000000, 32'hffffffff, 0);  // negative overflow
    check_one(32'h80000000, 32'h00000001, 1);  // overflow on subtract
    check_one(32'h7fffffff, 32'hffffffff, 1);
    check_one(32'h00000005, 32'h00000005, 1);  // zero
    check_one(32'h00000003, 32'h00000005, 1);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom, 1'($urandom));
    // exhaustive 2-bit check
    for (int x = -2; x <= 1; x++)
      for (int y = -2; y <= 1; y++)
        for (int s = 0; s < 2; s++) begin
          int exact;
          exact = s ? x - y : x + y;
          a2 = 2'(x); b2 = 2'(y); sub2 = 1'(s); #1;
          checks++;
          if (r2 !== 2'(exact) || ovf2 !== (exact < -2 || exact > 1)) begin
            failures++;
            $display("FAIL 2-bit %0d %s %0d: r=%b ovf=%b", x, s ? "-" : "+", y, r2, ovf2);
          end
        end
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow case exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
