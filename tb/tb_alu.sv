// tb_alu: self-checking test of the ALU.
// For every operation, corner cases and random operands are applied and the
// result and the zero output are compared with a reference computed in the
// testbench (signed compare for SLT). Equal operands under SUB must give
// zero = 1, the BEQ test.
module tb_alu;
  import mips_lite_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [31:0] a, b, result;
  alu_op_e     op;
  logic        zero;

  alu dut (.a(a), .b(b), .alu_ctr(op), .result(result), .zero(zero));

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_OR:  return x | y;
      ALU_AND: return x & y;
      ALU_SLT: return ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      default: return 32'hx;
    endcase
  endfunction

  task automatic check_one(alu_op_e o, logic [31:0] x, logic [31:0] y);
    logic [31:0] exp;
    op = o; a = x; b = y;
    #1;
    exp = ref_alu(o, x, y);
    checks++;
    if (result !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got %h z=%b exp %h", o.name(), x, y, result, zero, exp);
    end
  endtask

  alu_op_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_OR, ALU_AND, ALU_SLT};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] corners[6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h7FFF_FFFF, 32'h8000_0000, 32'h1234_5678};
    foreach (ops[o]) begin
      foreach (corners[x]) foreach (corners[y]) check_one(ops[o], corners[x], corners[y]);
      for (int k = 0; k < 200; k++) begin
        automatic logic [31:0] r = $urandom;
        check_one(ops[o], r, (k % 4 == 0) ? r : $urandom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
