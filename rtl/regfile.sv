// regfile: the 32 x 32-bit general purpose register file.
//
// Two read ports and one write port. RA selects the register driven on busA
// and RB the one driven on busB; reads are combinational (busA/busB follow
// RA/RB after the access time). RW selects the register written from busW at
// the rising clock edge when write_enable is 1; the clock matters only for
// writing. In this CPU RA/RB come from the instruction's rs/rt fields and
// RW from rd or rt.
//
// Register 0 always reads as zero and ignores writes, as MIPS requires of
// $zero; that rule and the lack of a reset are taken from the MIPS
// ISA; the register file itself is the plain 32-register, 2-read 1-write
// storage element.
module regfile
  import mips_pkg::*;
(
  input  logic              clk,
  input  logic              write_enable,
  input  logic [REG_AW-1:0] ra,
  input  logic [REG_AW-1:0] rb,
  input  logic [REG_AW-1:0] rw,
  input  logic [XLEN-1:0]   bus_w,
  output logic [XLEN-1:0]   bus_a,
  output logic [XLEN-1:0]   bus_b
);

  logic [XLEN-1:0] regs [NREGS];

  assign bus_a = (ra == '0) ? '0 : regs[ra];
  assign bus_b = (rb == '0) ? '0 : regs[rb];

  always_ff @(posedge clk) begin
    if (write_enable && rw != '0) regs[rw] <= bus_w;
  end

endmodule
