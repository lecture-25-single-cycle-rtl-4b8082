// regfile: the 32 x 32-bit register file of the MIPS-lite datapath.
//
// Two read ports and one write port. ra selects the register driven on busA
// and rb the one on busB; reads are combinational (a change of ra or rb shows
// on the bus in the same cycle). When write_enable is 1, busW is written into
// register rw on the rising clock edge, so an instruction reads two registers
// and writes a third in one cycle. A read of the register being written
// returns the old value until the edge.
//
// Register 0 always reads as zero and ignores writes, as the MIPS
// architecture defines; an asynchronous reset clears the other registers.
// Both points, and the rising clock edge, are this design's choices; the
// port set and the combinational read follow the source lecture.
module regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             write_enable,
  input  logic [AW-1:0]    ra,
  input  logic [AW-1:0]    rb,
  input  logic [AW-1:0]    rw,
  input  logic [WIDTH-1:0] bus_w,
  output logic [WIDTH-1:0] bus_a,
  output logic [WIDTH-1:0] bus_b
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (write_enable && rw != '0) begin
      regs[rw] <= bus_w;
    end
  end

  always_comb begin
    bus_a = (ra == '0) ? '0 : regs[ra];
    bus_b = (rb == '0) ? '0 : regs[rb];
  end

endmodule
