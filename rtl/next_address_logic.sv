// next_address_logic: computes the next program counter.
//
// Sequential code: next_pc = PC + 4. Taken branch (branch & zero, i.e. BEQ
// with R[rs] == R[rt]): next_pc = PC + 4 + (sign_ext(Imm16) || 00), the
// offset counted in words from the instruction after the branch. Purely
// combinational; the PC register that holds the result is in ifetch.
//
// The two sums and the choice between them follow the BEQ register transfer.
// Building it from two adders and a 2-to-1 multiplexer, rather than with the
// main ALU, is this design's choice (the ALU is busy with the compare in the
// same cycle).
module next_address_logic (
  input  logic [31:0] pc,
  input  logic [15:0] imm16,
  input  logic        branch,
  input  logic        zero,
  output logic [31:0] pc_plus4,
  output logic [31:0] next_pc
);

  logic [31:0] imm_ext;
  logic [31:0] offset;
  logic [31:0] target;
  logic        c0_unused;
  logic        c1_unused;
  logic        taken;

  extender u_ext (
    .imm16  (imm16),
    .ext_op (1'b1),
    .ext_imm(imm_ext)
  );

  always_comb offset = {imm_ext[29:0], 2'b00};

  adder #(.WIDTH(32)) u_inc (
    .a        (pc),
    .b        (32'd4),
    .carry_in (1'b0),
    .sum      (pc_plus4),
    .carry_out(c0_unused)
  );

  adder #(.WIDTH(32)) u_target (
    .a        (pc_plus4),
    .b        (offset),
    .carry_in (1'b0),
    .sum      (target),
    .carry_out(c1_unused)
  );

  always_comb taken = branch & zero;

  mux2 #(.WIDTH(32)) u_sel (
    .sel(taken),
    .a  (pc_plus4),
    .b  (target),
    .y  (next_pc)
  );

endmodule
