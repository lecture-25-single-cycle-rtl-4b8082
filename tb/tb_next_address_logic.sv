// tb_next_address_logic: self-checking test of the next-PC computation.
// Random PCs and immediates with all four branch/zero combinations; the
// expected next PC is PC + 4, or PC + 4 + 4 * signed(imm16) when both
// branch and zero are 1.
module tb_next_address_logic;
  int checks = 0;
  int failures = 0;

  logic [31:0] pc, pc_plus4, next_pc;
  logic [15:0] imm16;
  logic        branch, zero;

  next_address_logic dut (.pc(pc), .imm16(imm16), .branch(branch), .zero(zero),
                          .pc_plus4(pc_plus4), .next_pc(next_pc));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      logic [31:0] exp;
      longint      off;
      pc     = {$urandom_range(0, 32'h3FFF_FFFF), 2'b00};
      imm16  = (k < 4) ? 16'h8000 + 16'(k) : 16'($urandom);
      branch = k[0];
      zero   = k[1];
      #1;
      off = longint'($signed(imm16)) * 4;
      exp = (branch && zero) ? 32'(longint'(pc) + 4 + off) : pc + 32'd4;
      checks++;
      if (next_pc !== exp || pc_plus4 !== pc + 32'd4) begin
        failures++;
        $display("FAIL pc=%h imm=%h br=%b z=%b next=%h exp %h", pc, imm16, branch, zero, next_pc, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
