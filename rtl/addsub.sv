// addsub: N-bit adder-subtractor with signed overflow detection.
//
// Subtraction reuses the adder: every bit of B passes through an XOR gate
// driven by `sub`, so the XOR acts as a conditional inverter, and `sub` also
// drives CarryIn. With sub = 1 the adder computes A + ~B + 1 = A - B.
// Signed overflow is the XOR of the carry out of the top bit and the carry
// into it (c[N] XOR c[N-1]): a carry into the sign bit without one out of it
// means two positive operands gave a negative sum, and the reverse means two
// negative operands gave a positive sum. This structure is the standard
// MIPS datapath one; only the port names are this design's own.
//
// Combinational. carry_out is the raw adder carry (for subtraction it is 1
// when A >= B as unsigned numbers).
module addsub #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         sub,
  output logic [N-1:0] result,
  output logic         carry_out,
  output logic         overflow
);

  logic [N-1:0] b_xor;
  logic         c_msb;

  assign b_xor = b ^ {N{sub}};

  adder #(.N(N)) u_adder (
    .a             (a),
    .b             (b_xor),
    .carry_in      (sub),
    .sum           (result),
    .carry_out     (carry_out),
    .carry_into_msb(c_msb)
  );

  assign overflow = carry_out ^ c_msb;

endmodule
