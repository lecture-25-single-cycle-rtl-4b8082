// tb_register: self-checking test of the N-bit register with write enable.
// Random data and write enables each cycle; a model register in the
// testbench predicts data_out: it changes only on a clock edge with
// write_enable = 1, and reset loads the reset value.
module tb_register;
  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst;
  logic        we;
  logic [31:0] d, q;
  logic [31:0] model;

  register #(.N(32), .RESET_VALUE(32'hA5A5_0001)) dut (
    .clk(clk), .rst(rst), .write_enable(we), .data_in(d), .data_out(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; d = '0;
    @(negedge clk);
    checks++;
    if (q !== 32'hA5A5_0001) begin failures++; $display("FAIL reset value %h", q); end
    rst = 0;
    model = 32'hA5A5_0001;
    for (int k = 0; k < 300; k++) begin
      we = ($urandom % 3) != 0;
      d  = $urandom;
      @(posedge clk);
      if (we) model = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d q=%h exp %h", k, q, model); end
      // Between edges the output must not follow data_in.
      @(negedge clk);
      d = ~d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q changed without a clock edge"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
