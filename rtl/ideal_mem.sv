// ideal_mem: idealized word memory, used both as instruction memory and as
// data memory of the single-cycle CPU.
//
// One input bus (data_in), one output bus (data_out), a byte address and a
// Write Enable. Reading is combinational: data_out shows the word selected by
// addr after the access time, with no clock involved. The clock matters only
// for writing: when write_enable is 1, the word selected by addr takes
// data_in at the rising edge of clk.
//
// Addresses are byte addresses and words are 32 bits, so the word index is
// addr[AW+1:2]; the two low bits are ignored (accesses are taken as aligned)
// and address bits above the memory size are ignored, so the memory repeats
// through the address space. The size WORDS, the alignment and the
// wrap-around are this design's choices. The contents are not reset.
module ideal_mem #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        write_enable,
  input  logic [31:0] addr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out
);

  localparam int unsigned AW = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [31:0] mem [WORDS];
  logic [AW-1:0] idx;

  assign idx      = addr[AW+1:2];
  assign data_out = mem[idx];

  always_ff @(posedge clk) begin
    if (write_enable) mem[idx] <= data_in;
  end

endmodule
