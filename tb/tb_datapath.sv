// tb_datapath: self-checking test of the datapath with a testbench-side
// decoder and data memory.
//
// A random MIPS-lite program is loaded into the instruction memory under
// reset. Each cycle the testbench decodes the fetched word into the control
// points itself and serves the data memory port from its own array. The
// instruction-set simulator runs the same program; every cycle the PC, the
// fetched word, the store (address and data) and all 32 registers are
// compared with it.
module tb_datapath;
  import mips_lite_pkg::*;
  import mips_lite_ref_pkg::*;

  localparam int IWORDS = 64;
  localparam int DWORDS = 64;
  localparam int CYCLES = 2000;

  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst;
  ctrl_t       ctrl;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] pc, instr;
  logic        zero;
  logic [31:0] prog [IWORDS];
  logic [31:0] tbmem [DWORDS];
  mips_lite_iss iss;

  datapath #(.IMEM_WORDS(IWORDS)) dut (
    .clk(clk), .rst(rst), .ctrl(ctrl),
    .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data),
    .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata), .dmem_rdata(dmem_rdata),
    .pc(pc), .instr(instr), .zero(zero));

  always #5 clk = ~clk;

  // Testbench decoder, written from the register transfers.
  always_comb begin
    ctrl = '{reg_wr: 0, reg_dst: 0, ext_op: 0, alu_src: 0, alu_ctr: ALU_ADD,
             mem_wr: 0, mem_to_reg: 0, branch: 0};
    if (instr[31:26] == 6'h00 && instr[5:0] == 6'h21) begin
      ctrl.reg_wr = 1; ctrl.reg_dst = 1;
    end else if (instr[31:26] == 6'h00 && instr[5:0] == 6'h23) begin
      ctrl.reg_wr = 1; ctrl.reg_dst = 1; ctrl.alu_ctr = ALU_SUB;
    end else if (instr[31:26] == 6'h0D) begin
      ctrl.reg_wr = 1; ctrl.alu_src = 1; ctrl.alu_ctr = ALU_OR;
    end else if (instr[31:26] == 6'h23) begin
      ctrl.reg_wr = 1; ctrl.ext_op = 1; ctrl.alu_src = 1; ctrl.mem_to_reg = 1;
    end else if (instr[31:26] == 6'h2B) begin
      ctrl.ext_op = 1; ctrl.alu_src = 1; ctrl.mem_wr = 1;
    end else if (instr[31:26] == 6'h04) begin
      ctrl.ext_op = 1; ctrl.alu_ctr = ALU_SUB; ctrl.branch = 1;
    end
  end

  always_comb dmem_rdata = tbmem[(dmem_addr >> 2) % DWORDS];
  always_ff @(posedge clk) if (!rst && ctrl.mem_wr) tbmem[(dmem_addr >> 2) % DWORDS] <= dmem_wdata;

  initial begin
    repeat (CYCLES + IWORDS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iss = new(DWORDS);
    foreach (tbmem[i]) begin
      tbmem[i] = $urandom;
      iss.dmem[i] = tbmem[i];
    end
    // Seed a few registers first so that addresses and compares vary.
    foreach (prog[i]) prog[i] = random_instr();
    for (int i = 1; i < 8; i++) prog[i - 1] = ori(i, 0, $urandom_range(0, 16'hFFFF));
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    for (int i = 0; i < IWORDS; i++) begin
      load_we = 1; load_addr = 32'(i) * 4; load_data = prog[i];
      @(negedge clk);
    end
    load_we = 0;
    rst = 0;
    for (int k = 0; k < CYCLES; k++) begin
      logic [31:0] w;
      #1;
      w = prog[(iss.pc >> 2) % IWORDS];
      checks++;
      if (pc !== iss.pc || instr !== w) begin
        failures++;
        $display("FAIL cycle %0d pc=%h exp %h instr=%h exp %h", k, pc, iss.pc, instr, w);
      end
      iss.step(w);
      if (iss.st_we) begin
        checks++;
        if (dmem_addr !== iss.st_addr || dmem_wdata !== iss.st_data) begin
          failures++;
          $display("FAIL cycle %0d store addr=%h data=%h exp %h %h", k, dmem_addr, dmem_wdata,
                   iss.st_addr, iss.st_data);
        end
      end
      @(posedge clk);
      #1;
      for (int r = 0; r < 32; r++) begin
        automatic logic [31:0] got = (r == 0) ? 32'h0 : dut.u_regfile.regs[r];
        checks++;
        if (got !== iss.r[r]) begin
          failures++;
          $display("FAIL cycle %0d r%0d=%h exp %h", k, r, got, iss.r[r]);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
