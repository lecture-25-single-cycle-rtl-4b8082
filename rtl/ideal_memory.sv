// ideal_memory: the idealized word memory used for instructions and data.
//
// One Data In bus, one Data Out bus, an address and a write enable. The
// address selects the word driven on data_out; the read is combinational
// (data_out follows addr with no clock). When write_enable is 1 the addressed
// word takes data_in on the rising clock edge: the clock matters only for
// writes.
//
// The address is a byte address, as the CPU's PC and load/store addresses
// are; bits [1:0] are ignored (word accesses only) and the next
// $clog2(WORDS) bits index the array. Addresses beyond WORDS words wrap. The
// depth, the byte addressing and the rising edge are this design's choices;
// the contents are not reset.
module ideal_memory #(
  parameter int unsigned WORDS = 256,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned IW   = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic             write_enable,
  input  logic [31:0]      addr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  logic [WIDTH-1:0] mem [WORDS];
  logic [IW-1:0]    index;

  always_comb index = addr[IW+1:2];

  always_ff @(posedge clk) begin
    if (write_enable) mem[index] <= data_in;
  end

  always_comb data_out = mem[index];

endmodule
