// alu: 32-bit arithmetic and logic unit of the MIPS-lite datapath.
//
// Operations (alu_ctr): ADD and SUB (ADDU, SUBU, LW/SW address, BEQ compare),
// OR (ORI), and the two that the full MIPS ALU adds, AND and set-less-than
// (signed: result = 1 if A < B, else 0). zero is 1 when the result is all
// zeros; after a SUB it is the A == B test that BEQ needs. Purely
// combinational.
//
// Add and subtract share one adder: subtraction is A + ~B + 1. SLT takes the
// sign of A - B corrected for overflow. The operation set follows the
// source lecture; the encoding of alu_ctr and the shared-adder structure are this
// design's choices. The adder's carry out is not used: ADDU and SUBU ignore
// overflow.
module alu
  import mips_lite_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_op_e     alu_ctr,
  output logic [31:0] result,
  output logic        zero
);

  logic        sub;
  logic [31:0] b_in;
  logic [31:0] sum;
  logic        carry_unused;
  logic        less;

  always_comb begin
    sub  = (alu_ctr == ALU_SUB) || (alu_ctr == ALU_SLT);
    b_in = sub ? ~b : b;
  end

  adder #(.WIDTH(32)) u_adder (
    .a        (a),
    .b        (b_in),
    .carry_in (sub),
    .sum      (sum),
    .carry_out(carry_unused)
  );

  // Signed less-than: sign of the difference, flipped on overflow.
  always_comb less = sum[31] ^ ((a[31] ^ b[31]) & (a[31] ^ sum[31]));

  always_comb begin
    unique case (alu_ctr)
      ALU_ADD, ALU_SUB: result = sum;
      ALU_OR:           result = a | b;
      ALU_AND:          result = a & b;
      ALU_SLT:          result = {31'b0, less};
      default:          result = sum;
    endcase
    zero = (result == 32'b0);
  end

endmodule
