// tb_mips_lite_cpu: end-to-end test of the single-cycle MIPS-lite CPU at its
// default sizes (256-word instruction and data memories).
//
// Part 1, a directed program: sums ten words of data memory in a loop built
// from ORI, LW, ADDU, SUBU and BEQ, stores the sum with SW and parks in a
// one-instruction loop. The sum, the stored word and the cycle count (one
// instruction per clock: 67 instructions to reach the parking loop) are
// checked.
//
// Part 2, a random program (all six instructions, writes to register 0 and
// unknown encodings included) run for 3000 cycles against the
// instruction-set simulator: every cycle the PC, the fetched word, the data
// memory write and the 32 registers are compared, and the whole data memory
// at the end. Each kind of event (ADDU, SUBU, ORI, LW, SW, BEQ taken and not
// taken, a write aimed at register 0, an unknown instruction) is counted and
// must occur at least once.
module tb_mips_lite_cpu;
  import mips_lite_ref_pkg::*;

  localparam int IWORDS = 256;   // the CPU's default memory depths
  localparam int DWORDS = 256;
  localparam int CYCLES = 3000;

  int checks = 0;
  int failures = 0;
  int seen [K_NKINDS];
  int r0_writes = 0;

  logic        clk = 0;
  logic        rst;
  logic        load_we;
  logic [31:0] load_addr, load_data;
  logic [31:0] pc, instr;
  logic        dmem_we;
  logic [31:0] dmem_addr, dmem_wdata;
  logic [31:0] prog [IWORDS];
  mips_lite_iss iss;

  mips_lite_cpu dut (
    .clk(clk), .rst(rst),
    .imem_load_we(load_we), .imem_load_addr(load_addr), .imem_load_data(load_data),
    .pc(pc), .instr(instr),
    .dmem_we(dmem_we), .dmem_addr(dmem_addr), .dmem_wdata(dmem_wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 2 * IWORDS + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Hold reset and write prog[] into the instruction memory.
  task automatic load_program();
    rst = 1;
    @(negedge clk);
    for (int i = 0; i < IWORDS; i++) begin
      load_we = 1; load_addr = 32'(i) * 4; load_data = prog[i];
      @(negedge clk);
    end
    load_we = 0;
  endtask

  function automatic logic [31:0] reg_value(int r);
    return (r == 0) ? 32'h0 : dut.u_datapath.u_regfile.regs[r];
  endfunction

  initial begin
    int unsigned expected_sum;
    int          cycles;
    rst = 1; load_we = 0; load_addr = 0; load_data = 0;

    // ---------------- part 1: array sum --------------------------------
    foreach (prog[i]) prog[i] = {6'h3F, 26'h0};
    prog[0]  = ori(1, 0, 1);        // $1 = 1
    prog[1]  = ori(2, 0, 10);       // $2 = n = 10
    prog[2]  = ori(3, 0, 0);        // $3 = pointer
    prog[3]  = ori(4, 0, 0);        // $4 = sum
    prog[4]  = ori(5, 0, 4);        // $5 = 4
    prog[5]  = beq(2, 0, 5);        // loop: if n == 0 goto done
    prog[6]  = lw(6, 0, 3);         //   $6 = mem[$3]
    prog[7]  = addu(4, 4, 6);       //   sum += $6
    prog[8]  = addu(3, 3, 5);       //   pointer += 4
    prog[9]  = subu(2, 2, 1);       //   n -= 1
    prog[10] = beq(0, 0, -6);       //   goto loop
    prog[11] = sw(4, 16'h100, 0);   // done: mem[0x100] = sum
    prog[12] = beq(0, 0, -1);       // park
    expected_sum = 0;
    for (int i = 0; i < DWORDS; i++) begin
      dut.u_dmem.mem[i] = 32'h0100_0000 * 32'(i) + 32'(i * i);
      if (i < 10) expected_sum += 32'h0100_0000 * 32'(i) + 32'(i * i);
    end
    load_program();
    rst = 0;
    cycles = 0;
    while (pc != 32'h30 && cycles < 200) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    check(cycles == 67, $sformatf("sum loop took %0d cycles, expected 67", cycles));
    check(reg_value(4) == expected_sum, $sformatf("sum %h expected %h", reg_value(4), expected_sum));
    check(dut.u_dmem.mem[64] == expected_sum, "stored sum");
    repeat (5) @(posedge clk);
    #1;
    check(pc == 32'h30, "parked at 0x30");

    // ---------------- part 2: random program vs. the simulator ---------
    iss = new(DWORDS);
    for (int i = 0; i < DWORDS; i++) begin
      dut.u_dmem.mem[i] = $urandom;
      iss.dmem[i] = dut.u_dmem.mem[i];
    end
    foreach (prog[i]) prog[i] = random_instr();
    for (int i = 1; i < 8; i++) prog[i - 1] = ori(i, 0, $urandom_range(0, 16'hFFFF));
    prog[7] = addu(0, 1, 2);        // a write aimed at register 0
    load_program();
    rst = 0;
    for (int k = 0; k < CYCLES; k++) begin
      logic [31:0] w;
      #1;
      w = prog[(iss.pc >> 2) % IWORDS];
      check(pc == iss.pc && instr == w,
            $sformatf("cycle %0d pc=%h exp %h instr=%h exp %h", k, pc, iss.pc, instr, w));
      iss.step(w);
      seen[iss.kind]++;
      if (iss.r0_target) r0_writes++;
      check(dmem_we == iss.st_we, $sformatf("cycle %0d store enable %b", k, dmem_we));
      if (iss.st_we)
        check(dmem_addr == iss.st_addr && dmem_wdata == iss.st_data,
              $sformatf("cycle %0d store %h:%h exp %h:%h", k, dmem_addr, dmem_wdata,
                        iss.st_addr, iss.st_data));
      @(posedge clk);
      #1;
      for (int r = 0; r < 32; r++)
        check(reg_value(r) == iss.r[r],
              $sformatf("cycle %0d r%0d=%h exp %h", k, r, reg_value(r), iss.r[r]));
      @(negedge clk);
    end
    for (int i = 0; i < DWORDS; i++)
      check(dut.u_dmem.mem[i] == iss.dmem[i], $sformatf("dmem[%0d]", i));

    // Every mechanism must have been exercised.
    $display("events: addu=%0d subu=%0d ori=%0d lw=%0d sw=%0d beq_taken=%0d beq_not=%0d nop=%0d r0_writes=%0d",
             seen[K_ADDU], seen[K_SUBU], seen[K_ORI], seen[K_LW], seen[K_SW],
             seen[K_BEQ_TAKEN], seen[K_BEQ_NOT], seen[K_NOP], r0_writes);
    for (int k = 0; k < K_NKINDS; k++)
      check(seen[k] > 0, $sformatf("event kind %0d never happened", k));
    check(r0_writes > 0, "no write aimed at register 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
