// mux2: N-bit two-input multiplexer, the "MUX" building block
// (ports A, B, Select, Y). Y = A when Select is 0 and B when Select is 1,
// matching the 0/1 inputs of the RegDst and ALUSrc multiplexers of the
// datapath. Combinational.
module mux2 #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sel,
  output logic [N-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
