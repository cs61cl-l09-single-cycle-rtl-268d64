// tb_regfile: self-checking test of the 32 x 32-bit register file: random
// writes through RW/busW with Write Enable, both read ports checked against
// a model, register 0 reading zero, and no write when Write Enable is 0.
module tb_regfile;
  logic        clk = 0, we;
  logic [4:0]  ra, rb, rw;
  logic [31:0] bw, ba, bb;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile dut (.clk(clk), .write_enable(we), .ra(ra), .rb(rb), .rw(rw), .bus_w(bw), .bus_a(ba), .bus_b(bb));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; ra = 0; rb = 0; rw = 0; bw = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we = 1; rw = 5'(i); bw = $urandom; model[i] = (i == 0) ? 32'h0 : bw;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 800; i++) begin
      @(negedge clk);
      we = 1'($urandom); rw = 5'($urandom); bw = $urandom;
      ra = 5'($urandom); rb = 5'($urandom);
      #1;
      checks++;
      if (ba !== model[ra] || bb !== model[rb]) begin
        failures++; $display("FAIL ra=%0d ba=%h exp %h rb=%0d bb=%h exp %h", ra, ba, model[ra], rb, bb, model[rb]);
      end
      @(posedge clk);
      if (we && rw != 0) model[rw] = bw;
      #1;
      ra = rw; #1;
      checks++;
      if (ba !== model[rw]) begin failures++; $display("FAIL after write rw=%0d ba=%h exp %h", rw, ba, model[rw]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
