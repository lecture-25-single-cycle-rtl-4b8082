// mips_lite_pkg: shared types and constants of the single-cycle MIPS-lite CPU.
//
// The instruction formats (R-type: op/rs/rt/rd/shamt/funct, I-type:
// op/rs/rt/imm16, J-type: op/target) and their field positions follow the
// MIPS formats. The numeric opcode and funct values are the standard MIPS
// ones (ADDU funct 0x21, SUBU 0x23, ORI op 0x0D, LW 0x23, SW 0x2B, BEQ 0x04);
// they are this design's choice, taken from the MIPS architecture. The ALU
// operation encoding is also this design's own.
package mips_lite_pkg;

  localparam int unsigned XLEN     = 32;  // data path and instruction width
  localparam int unsigned NREGS    = 32;  // architectural registers
  localparam int unsigned REG_AW   = 5;   // register specifier width

  typedef enum logic [5:0] {
    OP_RTYPE = 6'h00,
    OP_BEQ   = 6'h04,
    OP_ORI   = 6'h0D,
    OP_LW    = 6'h23,
    OP_SW    = 6'h2B
  } opcode_e;

  typedef enum logic [5:0] {
    FN_ADDU = 6'h21,
    FN_SUBU = 6'h23
  } funct_e;

  // ALU operations: the three MIPS-lite needs (add, sub, or) plus the two
  // that the full MIPS ALU adds (and, set-less-than).
  typedef enum logic [2:0] {
    ALU_ADD = 3'd0,
    ALU_SUB = 3'd1,
    ALU_OR  = 3'd2,
    ALU_AND = 3'd3,
    ALU_SLT = 3'd4
  } alu_op_e;

  // R-type instruction fields, bit 31 first.
  typedef struct packed {
    logic [5:0] op;
    logic [4:0] rs;
    logic [4:0] rt;
    logic [4:0] rd;
    logic [4:0] shamt;
    logic [5:0] funct;
  } rtype_t;

  // I-type instruction fields, bit 31 first.
  typedef struct packed {
    logic [5:0]  op;
    logic [4:0]  rs;
    logic [4:0]  rt;
    logic [15:0] imm16;
  } itype_t;

  // Control points of the datapath.
  typedef struct packed {
    logic    reg_wr;     // RegWr: write busW into R[RW]
    logic    reg_dst;    // RegDst: 1 = RW is rd, 0 = RW is rt
    logic    ext_op;     // ExtOp: 1 = sign extend Imm16, 0 = zero extend
    logic    alu_src;    // ALUSrc: 1 = ALU B operand is the extended immediate
    alu_op_e alu_ctr;    // ALUctr
    logic    mem_wr;     // MemWr: write R[rt] to data memory
    logic    mem_to_reg; // MemtoReg: 1 = busW is the data memory output
    logic    branch;     // Branch: take the branch when the ALU result is zero
  } ctrl_t;

endpackage
