// tb_control: self-checking test of the main decoder.
// Each MIPS-lite instruction's opcode/funct is applied and every control
// point compared with the expected table row; then all other opcodes, and
// R-type with other funct values, must write nothing and not branch.
module tb_control;
  import mips_lite_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [5:0] op, funct;
  ctrl_t      ctrl;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  // Expected row: reg_wr reg_dst ext_op alu_src alu mem_wr mem_to_reg branch.
  // A field that the instruction does not use is not compared (care mask).
  task automatic check_row(string name, logic [5:0] o, logic [5:0] f,
                           logic rw, logic rd, logic ex, logic as, alu_op_e al,
                           logic mw, logic mr, logic br,
                           logic care_rd, logic care_ex, logic care_mr);
    op = o; funct = f;
    #1;
    checks++;
    if (ctrl.reg_wr !== rw || ctrl.alu_src !== as || ctrl.alu_ctr !== al ||
        ctrl.mem_wr !== mw || ctrl.branch !== br ||
        (care_rd && ctrl.reg_dst !== rd) || (care_ex && ctrl.ext_op !== ex) ||
        (care_mr && ctrl.mem_to_reg !== mr)) begin
      failures++;
      $display("FAIL %s: got %p", name, ctrl);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    //            name    op     funct  RegWr Dst Ext Src ALU     MemWr M2R Br   care:Dst Ext M2R
    check_row("addu", 6'h00, 6'h21, 1, 1, 0, 0, ALU_ADD, 0, 0, 0,  1, 0, 1);
    check_row("subu", 6'h00, 6'h23, 1, 1, 0, 0, ALU_SUB, 0, 0, 0,  1, 0, 1);
    check_row("ori",  6'h0D, 6'h3F, 1, 0, 0, 1, ALU_OR,  0, 0, 0,  1, 1, 1);
    check_row("lw",   6'h23, 6'h00, 1, 0, 1, 1, ALU_ADD, 0, 1, 0,  1, 1, 1);
    check_row("sw",   6'h2B, 6'h15, 0, 0, 1, 1, ALU_ADD, 1, 0, 0,  0, 1, 0);
    check_row("beq",  6'h04, 6'h21, 0, 0, 1, 0, ALU_SUB, 0, 0, 1,  0, 1, 0);
    // Everything else: no register write, no store, no branch.
    for (int o = 0; o < 64; o++) begin
      for (int f = 0; f < 64; f += 5) begin
        automatic logic known = (o == 6'h00 && (f == 6'h21 || f == 6'h23)) ||
                      o == 6'h0D || o == 6'h23 || o == 6'h2B || o == 6'h04;
        if (!known) begin
          op = 6'(o); funct = 6'(f);
          #1;
          checks++;
          if (ctrl.reg_wr || ctrl.mem_wr || ctrl.branch) begin
            failures++;
            $display("FAIL op=%h funct=%h not a no-op: %p", op, funct, ctrl);
          end
        end
      end
    end
    // The funct values of ADDU/SUBU with other R-type funct neighbours.
    op = 6'h00; funct = 6'h23; #1;
    checks++;
    if (ctrl.alu_ctr !== ALU_SUB) begin failures++; $display("FAIL subu alu"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
