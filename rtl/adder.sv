// adder: N-bit ripple-carry adder, the "Adder" building block of the
// single-cycle datapath (ports A, B, CarryIn, Sum, CarryOut).
//
// It is a chain of 1-bit full adders: bit i adds a[i], b[i] and the carry
// c[i] coming from bit i-1, and passes c[i+1] on, with c[0] = CarryIn and
// CarryOut = c[N]. Besides the ports of the building block it brings out
// c[N-1], the carry into the most significant bit, because signed overflow
// is c[N] XOR c[N-1]; that output is this design's addition.
//
// Purely combinational; no clock.
module adder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         carry_in,
  output logic [N-1:0] sum,
  output logic         carry_out,
  output logic         carry_into_msb
);

  logic [N:0] c;

  assign c[0] = carry_in;

  for (genvar i = 0; i < N; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign carry_out      = c[N];
  assign carry_into_msb = c[N-1];

endmodule
