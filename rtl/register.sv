// register: N-bit register with write enable.
//
// On the rising clock edge, data_out takes data_in when write_enable is 1 and
// holds its value when it is 0. An asynchronous active-high reset loads
// RESET_VALUE. Interface: clk, rst, write_enable, data_in[N], data_out[N].
// The write-enable behaviour follows the source lecture; the reset and the choice
// of the rising edge are this design's own.
module register #(
  parameter int unsigned         N           = 32,
  parameter logic [N-1:0]        RESET_VALUE = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         write_enable,
  input  logic [N-1:0] data_in,
  output logic [N-1:0] data_out
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)               data_out <= RESET_VALUE;
    else if (write_enable) data_out <= data_in;
  end

endmodule
