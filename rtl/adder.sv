// adder: WIDTH-bit binary adder with carry in and carry out.
//
// Sum = A + B + CarryIn; CarryOut is the carry out of the top bit. Purely
// combinational. The ports are the adder building block of the datapath
// (A, B, CarryIn, Sum, CarryOut, 32 bits wide); the adder's internal
// structure is left to synthesis, which is this design's choice.
module adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             carry_in,
  output logic [WIDTH-1:0] sum,
  output logic             carry_out
);

  always_comb begin
    {carry_out, sum} = {1'b0, a} + {1'b0, b} + {{WIDTH{1'b0}}, carry_in};
  end

endmodule
