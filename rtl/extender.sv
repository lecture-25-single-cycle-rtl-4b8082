// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ext_op = 1 gives sign_ext(Imm16) (LW, SW, BEQ); ext_op = 0 gives
// zero_ext(Imm16) (ORI). Purely combinational. The two kinds of extension
// follow the register transfers of the instruction set; having a single
// extender with a select input (ExtOp) is this design's choice.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,
  output logic [31:0] ext_imm
);

  always_comb ext_imm = {{16{ext_op & imm16[15]}}, imm16};

endmodule
