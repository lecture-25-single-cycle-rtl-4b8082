// ifetch: the instruction fetch unit.
//
// Holds the PC, reads the instruction word mem[PC] from the instruction
// memory, and on every rising clock edge loads the PC with the output of the
// next address logic (PC + 4, or the branch target when branch & zero).
// instr is valid combinationally from the PC; the PC advances once per clock,
// so one instruction completes per cycle.
//
// Program loading (this design's addition): while load_we is 1 the
// instruction memory is addressed by load_addr instead of the PC and takes
// load_data on the clock edge. Loading is meant to happen with rst held; the
// PC resets to RESET_PC (0 by default). Both are this design's choices; the
// PC / next address logic / instruction memory structure follows the
// source lecture.
module ifetch #(
  parameter int unsigned IMEM_WORDS = 256,
  parameter logic [31:0] RESET_PC   = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,
  // branch control from the decoder and the ALU
  input  logic        branch,
  input  logic        zero,
  // instruction memory load port
  input  logic        load_we,
  input  logic [31:0] load_addr,
  input  logic [31:0] load_data,
  // fetched instruction
  output logic [31:0] pc,
  output logic [31:0] pc_plus4,
  output logic [31:0] instr
);

  logic [31:0] next_pc;
  logic [31:0] imem_addr;

  register #(.N(32), .RESET_VALUE(RESET_PC)) u_pc (
    .clk         (clk),
    .rst         (rst),
    .write_enable(1'b1),
    .data_in     (next_pc),
    .data_out    (pc)
  );

  next_address_logic u_nal (
    .pc      (pc),
    .imm16   (instr[15:0]),
    .branch  (branch),
    .zero    (zero),
    .pc_plus4(pc_plus4),
    .next_pc (next_pc)
  );

  mux2 #(.WIDTH(32)) u_addr_sel (
    .sel(load_we),
    .a  (pc),
    .b  (load_addr),
    .y  (imem_addr)
  );

  ideal_memory #(.WORDS(IMEM_WORDS), .WIDTH(32)) u_imem (
    .clk         (clk),
    .write_enable(load_we),
    .addr        (imem_addr),
    .data_in     (load_data),
    .data_out    (instr)
  );

endmodule
