// mux2: WIDTH-bit 2-to-1 multiplexer.
//
// y = sel ? b : a. Purely combinational. The datapath uses it, at several
// widths, to choose the write register (RegDst), the ALU B operand (ALUSrc),
// the write-back value (MemtoReg) and the next PC (branch taken or not).
// Which input Select = 1 picks is this design's convention.
module mux2 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  always_comb y = sel ? b : a;

endmodule
