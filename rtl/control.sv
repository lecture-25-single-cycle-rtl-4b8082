// control: main decoder of the single-cycle MIPS-lite CPU.
//
// Maps the opcode (and, for R-type, the funct field) of the current
// instruction to the datapath's control points, purely combinationally:
//
//   instr  RegWr RegDst ExtOp ALUSrc ALUctr MemWr MemtoReg Branch
//   ADDU     1     rd     -     reg    ADD    0      alu      0
//   SUBU     1     rd     -     reg    SUB    0      alu      0
//   ORI      1     rt    zero   imm    OR     0      alu      0
//   LW       1     rt    sign   imm    ADD    0      mem      0
//   SW       0     -     sign   imm    ADD    1      -        0
//   BEQ      0     -     sign   reg    SUB    0      -        1
//
// Each row realises the register transfer of that instruction on the
// datapath. Any other opcode or funct writes nothing and does not branch,
// so it acts as a no-op with PC = PC + 4 (this design's choice).
module control
  import mips_lite_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] funct,
  output ctrl_t      ctrl
);

  always_comb begin
    ctrl = '{reg_wr: 1'b0, reg_dst: 1'b0, ext_op: 1'b0, alu_src: 1'b0,
             alu_ctr: ALU_ADD, mem_wr: 1'b0, mem_to_reg: 1'b0, branch: 1'b0};
    case (op)
      OP_RTYPE: begin
        case (funct)
          FN_ADDU: begin
            ctrl.reg_wr  = 1'b1;
            ctrl.reg_dst = 1'b1;
            ctrl.alu_ctr = ALU_ADD;
          end
          FN_SUBU: begin
            ctrl.reg_wr  = 1'b1;
            ctrl.reg_dst = 1'b1;
            ctrl.alu_ctr = ALU_SUB;
          end
          default: ;
        endcase
      end
      OP_ORI: begin
        ctrl.reg_wr  = 1'b1;
        ctrl.ext_op  = 1'b0;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_OR;
      end
      OP_LW: begin
        ctrl.reg_wr     = 1'b1;
        ctrl.ext_op     = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.alu_ctr    = ALU_ADD;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_src = 1'b1;
        ctrl.alu_ctr = ALU_ADD;
        ctrl.mem_wr  = 1'b1;
      end
      OP_BEQ: begin
        ctrl.ext_op  = 1'b1;
        ctrl.alu_ctr = ALU_SUB;
        ctrl.branch  = 1'b1;
      end
      default: ;
    endcase
  end

endmodule
