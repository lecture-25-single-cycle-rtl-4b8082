// tb_ifetch: self-checking test of the instruction fetch unit.
// Loads random instruction words under reset, then drives random
// branch/zero inputs for many cycles. A model PC (PC + 4, or
// PC + 4 + 4 * signed(imm16) of the fetched word when branch and zero are
// both 1) predicts pc each cycle, and instr must equal the loaded word at
// that PC. One new PC per clock is checked, the fetch rate of a
// single-cycle CPU.
module tb_ifetch;
  localparam int WORDS = 64;

  int checks = 0;
  int failures = 0;
  int taken = 0;

  logic        clk = 0;
  logic        rst;
  logic        branch, zero;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] pc, pc_plus4, instr;
  logic [31:0] image [WORDS];
  logic [31:0] model_pc;

  ifetch #(.IMEM_WORDS(WORDS)) dut (
    .clk(clk), .rst(rst), .branch(branch), .zero(zero),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data),
    .pc(pc), .pc_plus4(pc_plus4), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; branch = 0; zero = 0; load_we = 0; load_addr = 0; load_data = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      image[i] = $urandom;
      // keep the branch offsets small so that jumps land nearby
      image[i][15:0] = 16'($signed(6'($urandom)));
      load_we = 1; load_addr = 32'(i) * 4; load_data = image[i];
      @(negedge clk);
    end
    load_we = 0;
    #1;
    checks++;
    if (pc !== 32'h0 || instr !== image[0]) begin
      failures++; $display("FAIL after reset pc=%h instr=%h", pc, instr);
    end
    rst = 0;
    model_pc = 0;
    for (int k = 0; k < 1000; k++) begin
      logic [31:0] w;
      branch = $urandom % 2; zero = $urandom % 2;
      #1;
      w = image[model_pc[$clog2(WORDS)+1:2]];
      checks++;
      if (pc !== model_pc || instr !== w || pc_plus4 !== model_pc + 4) begin
        failures++;
        $display("FAIL cycle %0d pc=%h exp %h instr=%h exp %h", k, pc, model_pc, instr, w);
      end
      @(posedge clk);
      if (branch && zero) begin
        model_pc = model_pc + 4 + {{14{w[15]}}, w[15:0], 2'b00};
        taken++;
      end else begin
        model_pc = model_pc + 4;
      end
      @(negedge clk);
    end
    checks++;
    if (taken == 0) begin failures++; $display("FAIL no branch taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
