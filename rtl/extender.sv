// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// With ext_op = 0 it zero-extends (16 zeros above imm16), as ori needs:
// R[rt] = R[rs] | ZeroExt(imm16). With ext_op = 1 it sign-extends (16
// copies of imm16[15]), as lw, sw and beq need for their address offsets.
// Zero-extension for ori and sign-extension for
// addresses are MIPS rules; folding both into one block
// with a select input (ExtOp) is the usual single-cycle arrangement and is
// this design's choice. Combinational.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] imm32
);

  always_comb imm32 = {{16{ext_op & imm16[15]}}, imm16};

endmodule
