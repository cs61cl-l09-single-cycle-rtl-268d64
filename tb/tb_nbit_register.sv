// tb_nbit_register: self-checking test of the register with Write Enable.
// The output must take the input at a rising edge only when Write Enable is
// 1, hold otherwise, and go to the reset value on reset.
module tb_nbit_register;
  localparam logic [31:0] RV = 32'h0000_1234;
  logic        clk = 0, rst, we;
  logic [31:0] d, q, model;
  int checks = 0, failures = 0;

  nbit_register #(.N(32), .RESET_VALUE(RV)) dut (.clk(clk), .rst(rst), .write_enable(we), .data_in(d), .data_out(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(posedge clk); #1;
    checks++; if (q !== RV) begin failures++; $display("FAIL reset q=%h", q); end
    model = RV;
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      we = 1'($urandom); d = $urandom; rst = ($urandom % 50 == 0);
      @(posedge clk);
      if (rst) model = RV; else if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL i=%0d we=%b d=%h q=%h exp=%h", i, we, d, q, model); end
      // output must not change between edges
      d = ~d; #2;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q changed without a clock edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
