// tb_ideal_mem: self-checking test of the idealized memory. Writes random
// words with Write Enable 1, checks that Write Enable 0 leaves the contents
// alone, and checks that reading is combinational (Data Out follows the
// address with no clock edge) against a model array.
module tb_ideal_mem;
  localparam int WORDS = 64;
  logic        clk = 0, we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  ideal_mem #(.WORDS(WORDS)) dut (.clk(clk), .write_enable(we), .addr(addr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    // fill every word
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); we = 1; addr = 32'(i * 4); din = $urandom; model[i] = din;
    end
    @(negedge clk); we = 0;
    // random writes (some with we = 0) and combinational reads
    for (int i = 0; i < 600; i++) begin
      int w;
      @(negedge clk);
      w = $urandom % WORDS;
      we = 1'($urandom); addr = 32'(w * 4) | 32'($urandom % 4); din = $urandom;
      @(posedge clk);
      if (we) model[w] = din;
      #1; we = 0;
      // read a random word between edges: combinational read
      w = $urandom % WORDS;
      addr = 32'(w * 4); #1;
      checks++;
      if (dout !== model[w]) begin failures++; $display("FAIL read word %0d got %h exp %h", w, dout, model[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
