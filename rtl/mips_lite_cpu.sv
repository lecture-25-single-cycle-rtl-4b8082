// mips_lite_cpu: single-cycle CPU for the MIPS-lite instruction subset.
//
// Executes ADDU, SUBU, ORI, LW, SW and BEQ, one instruction per clock cycle
// (CPI = 1): in each cycle the instruction at PC is fetched, decoded by the
// control, its operands read from the register file, the ALU evaluated and,
// on the rising clock edge, the PC, the register file and the data memory
// are updated together.
//
// Structure: control (decoder) + datapath (fetch unit with instruction
// memory, register file, extender, ALU, multiplexers) + data memory, both
// memories being the idealized memory (combinational read, clocked write).
//
// Interface: clk, rst (asynchronous, active high: PC = 0, registers = 0);
// an instruction memory load port (imem_load_we/addr/data, byte address,
// used while rst is held); and, for observation, the current pc and instr
// and the data memory write (dmem_we/addr/wdata) of the current cycle.
// The memory depths are this design's choice (the source lecture gives none).
module mips_lite_cpu
  import mips_lite_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        imem_load_we,
  input  logic [31:0] imem_load_addr,
  input  logic [31:0] imem_load_data,
  output logic [31:0] pc,
  output logic [31:0] instr,
  output logic        dmem_we,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata
);

  ctrl_t       ctrl;
  logic [31:0] dmem_rdata;
  logic        zero_unused;

  control u_control (
    .op   (instr[31:26]),
    .funct(instr[5:0]),
    .ctrl (ctrl)
  );

  datapath #(.IMEM_WORDS(IMEM_WORDS)) u_datapath (
    .clk           (clk),
    .rst           (rst),
    .ctrl          (ctrl),
    .imem_load_we  (imem_load_we),
    .imem_load_addr(imem_load_addr),
    .imem_load_data(imem_load_data),
    .dmem_addr     (dmem_addr),
    .dmem_wdata    (dmem_wdata),
    .dmem_rdata    (dmem_rdata),
    .pc            (pc),
    .instr         (instr),
    .zero          (zero_unused)
  );

  // Stores are blocked while the program is loaded under reset.
  always_comb dmem_we = ctrl.mem_wr & ~rst;

  ideal_memory #(.WORDS(DMEM_WORDS), .WIDTH(32)) u_dmem (
    .clk         (clk),
    .write_enable(dmem_we),
    .addr        (dmem_addr),
    .data_in     (dmem_wdata),
    .data_out    (dmem_rdata)
  );

endmodule
