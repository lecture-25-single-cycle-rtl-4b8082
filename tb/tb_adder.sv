// tb_adder: self-checking test of the 32-bit adder.
// Drives corner cases and random operands with both carry-in values and
// compares {carry_out, sum} with a 64-bit reference sum.
module tb_adder;
  int checks = 0;
  int failures = 0;

  logic [31:0] a, b, sum;
  logic        cin, cout;

  adder #(.WIDTH(32)) dut (.a(a), .b(b), .carry_in(cin), .sum(sum), .carry_out(cout));

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [63:0] ref_sum;
    a = ta; b = tb_; cin = tc;
    #1;
    ref_sum = 64'(ta) + 64'(tb_) + 64'(tc);
    checks++;
    if ({cout, sum} !== ref_sum[32:0]) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h exp %b_%h", ta, tb_, tc, cout, sum,
               ref_sum[32], ref_sum[31:0]);
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
    check_one(32'h0, 32'h0, 1'b0);
    check_one(32'hFFFF_FFFF, 32'h1, 1'b0);
    check_one(32'hFFFF_FFFF, 32'h0, 1'b1);
    check_one(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check_one(32'h7FFF_FFFF, 32'h1, 1'b0);
    check_one(32'h0000_FFFF, 32'h0000_0001, 1'b0);
    for (int k = 0; k < 500; k++) check_one($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
