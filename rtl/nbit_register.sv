// nbit_register: N-bit register with Write Enable, the storage building
// block of the datapath (used for the PC).
//
// Like a D flip-flop but N bits wide: when write_enable is 1, data_out takes
// data_in at the rising clock edge; when it is 0, data_out does not change.
// The synchronous reset to RESET_VALUE is this design's addition, so that the
// PC starts at a known address; reset takes priority over write_enable.
module nbit_register #(
  parameter int unsigned   N           = 32,
  parameter logic [N-1:0]  RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         write_enable,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] data_out
);

  always_ff @(posedge clk) begin
    if (rst)               data_out <= RESET_VALUE;
    else if (write_enable) data_out <= data_in;
  end

endmodule
