// datapath: the single-cycle MIPS-lite datapath, without its control.
//
// Instruction fetch unit -> register file (Ra = rs, Rb = rt) -> ALU, all
// combinational within one clock cycle; the register file, the PC and the
// data memory (outside this module) are written on the rising edge that ends
// the cycle. The control points arrive in ctrl:
//
//   RegDst   picks the write register: rd (R-type) or rt (ORI, LW)
//   ExtOp    sign or zero extension of Imm16
//   ALUSrc   ALU B operand: busB or the extended immediate
//   ALUctr   ALU operation
//   MemtoReg busW: ALU result or the data memory output
//   RegWr    register file write enable
//   Branch   with the ALU zero output, selects the branch target as next PC
//
// The data memory port is dmem_addr (the ALU result, R[rs] + sign_ext(Imm16)),
// dmem_wdata (busB, i.e. R[rt]) and dmem_rdata; its write enable (MemWr) goes
// from the control straight to the memory. instr goes to the control.
// The units and their wiring follow the source lecture; the multiplexer placement
// for RegDst, ALUSrc and MemtoReg is the usual one for this datapath and is
// this design's reading of the register transfers.
module datapath
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  ctrl_t       ctrl,
  // instruction memory load port
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  // data memory port
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // state seen from outside
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        zero
);

  rtype_t      r;
  itype_t      i;
  logic [31:0] pc_plus4_unused;
  logic [REG_AW-1:0] rw;
  logic [31:0] bus_a;
  logic [31:0] bus_b;
  logic [31:0] bus_w;
  logic [31:0] ext_imm;
  logic [31:0] alu_b;
  logic [31:0] alu_result;

  always_comb begin
    r = rtype_t'(instr);
    i = itype_t'(instr);
  end

  ifetch #(.IMEM_WORDS(IMEM_WORDS)) u_ifetch (
    .clk      (clk),
    .rst      (rst),
    .branch   (ctrl.branch),
    .zero     (zero),
    .load_we  (imem_load_we),
    .load_addr(imem_load_addr),
    .load_data(imem_load_data),
    .pc       (pc),
    .pc_plus4 (pc_plus4_unused),
    .instr    (instr)
  );

  mux2 #(.WIDTH(REG_AW)) u_regdst (
    .sel(ctrl.reg_dst),
    .a  (r.rt),
    .b  (r.rd),
    .y  (rw)
  );

  regfile #(.NREGS(NREGS), .WIDTH(XLEN)) u_regfile (
    .clk         (clk),
    .rst         (rst),
    .write_enable(ctrl.reg_wr),
    .ra          (r.rs),
    .rb          (r.rt),
    .rw          (rw),
    .bus_w       (bus_w),
    .bus_a       (bus_a),
    .bus_b       (bus_b)
  );

  extender u_ext (
    .imm16  (i.imm16),
    .ext_op (ctrl.ext_op),
    .ext_imm(ext_imm)
  );

  mux2 #(.WIDTH(32)) u_alusrc (
    .sel(ctrl.alu_src),
    .a  (bus_b),
    .b  (ext_imm),
    .y  (alu_b)
  );

  alu u_alu (
    .a      (bus_a),
    .b      (alu_b),
    .alu_ctr(ctrl.alu_ctr),
    .result (alu_result),
    .zero   (zero)
  );

  mux2 #(.WIDTH(32)) u_memtoreg (
    .sel(ctrl.mem_to_reg),
    .a  (alu_result),
    .b  (dmem_rdata),
    .y  (bus_w)
  );

  always_comb begin
    dmem_addr  = alu_result;
    dmem_wdata = bus_b;
  end

endmodule
