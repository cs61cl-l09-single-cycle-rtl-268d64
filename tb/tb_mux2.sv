// tb_mux2: self-checking test of the 2-input multiplexer: Y must equal A
// when Select is 0 and B when Select is 1, for random data.
module tb_mux2;
  localparam int N = 32;
  logic [N-1:0] a, b, y;
  logic sel;
  int checks = 0, failures = 0;

  mux2 #(.N(N)) dut (.a(a), .b(b), .sel(sel), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = $urandom; b = $urandom; sel = 1'(i & 1); #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
