// tb_extender: self-checking test of the immediate extender.
// Every 16-bit immediate is extended both ways and compared with the signed
// and unsigned value of the immediate computed in the testbench.
module tb_extender;
  int checks = 0;
  int failures = 0;

  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] ext_imm;

  extender dut (.imm16(imm16), .ext_op(ext_op), .ext_imm(ext_imm));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v += 7) begin
      int signed sval;
      imm16 = 16'(v);
      sval  = (v >= 32768) ? v - 65536 : v;
      ext_op = 1'b1;
      #1;
      checks++;
      if (ext_imm !== 32'(sval)) begin
        failures++;
        $display("FAIL sign imm=%h got %h", imm16, ext_imm);
      end
      ext_op = 1'b0;
      #1;
      checks++;
      if (ext_imm !== 32'(v)) begin
        failures++;
        $display("FAIL zero imm=%h got %h", imm16, ext_imm);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
