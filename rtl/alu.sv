// alu: 32-bit arithmetic-logic unit of the single-cycle datapath
// (ports A, B, ALUctr, Result, plus a Zero flag).
//
// MIPS-lite needs addition (addu, lw, sw address), subtraction (subu),
// logical OR (ori) and an equality test (beq). The equality test is done by
// subtracting and checking whether the result is zero, so the ALU has a Zero
// output. AND and set-less-than (Result = 1 if A < B as signed numbers, else
// 0) are also provided so that the ALU covers the usual MIPS ALU operations.
// Add and subtract share one adder-subtractor (XOR conditional inverter on B);
// set-less-than uses the same subtraction and takes sign XOR overflow.
//
// The operation list is the usual MIPS ALU set; the ALUctr encoding (mips_pkg) and
// the overflow output being reported but not trapped on are this design's
// choices (addu/subu ignore overflow). Combinational.
module alu
  import mips_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  alu_ctr_e     alu_ctr,
  output logic [N-1:0] result,
  output logic         zero,
  output logic         overflow
);

  logic         sub;
  logic [N-1:0] as_result;
  logic         as_cout;
  logic         as_ovf;

  // Everything except ADD uses the subtractor path; OR/AND ignore it.
  assign sub = (alu_ctr != ALU_ADD);

  addsub #(.N(N)) u_addsub (
    .a        (a),
    .b        (b),
    .sub      (sub),
    .result   (as_result),
    .carry_out(as_cout),
    .overflow (as_ovf)
  );

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = as_result;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {{(N-1){1'b0}}, as_result[N-1] ^ as_ovf};
      default:          result = '0;
    endcase
  end

  assign zero     = (result == '0);
  assign overflow = ((alu_ctr == ALU_ADD) || (alu_ctr == ALU_SUB)) && as_ovf;

endmodule
