// tb_adder: self-checking test of the N-bit ripple-carry adder.
// Drives corner cases and random operands with both carry-in values and
// compares Sum, CarryOut and the carry into the top bit with the result of
// a wider integer addition.
module tb_adder;
  localparam int N = 32;
  logic [N-1:0] a, b, sum;
  logic cin, cout, cmsb;
  int checks = 0, failures = 0;

  adder #(.N(N)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry_out(cout), .carry_into_msb(cmsb));

  task automatic check_one(input logic [N-1:0] xa, input logic [N-1:0] xb, input logic xc);
    logic [N:0]   full;
    logic [N-1:0] low;
    a = xa; b = xb; cin = xc; #1;
    full = {1'b0, xa} + {1'b0, xb} + {{N{1'b0}}, xc};
    low  = {1'b0, xa[N-2:0]} + {1'b0, xb[N-2:0]} + {{(N-1){1'b0}}, xc};
    checks++;
    if (sum !== full[N-1:0] || cout !== full[N] || cmsb !== low[N-1]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b sum=%h cout=%b cmsb=%b", xa, xb, xc, sum, cout, cmsb);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one('0, '0, 0);
    check_one('1, '0, 1);
    check_one('1, '1, 1);
    check_one(32'h7fffffff, 32'h1, 0);
    check_one(32'h80000000, 32'h80000000, 0);
    for (int i = 0; i < 2000; i++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
