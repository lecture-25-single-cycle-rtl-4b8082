// tb_ideal_memory: self-checking test of the idealized memory.
// Writes a pattern at clock edges, then reads it back combinationally (the
// address changes with no clock edge in between); checks that
// write_enable = 0 writes nothing and that the two low address bits are
// ignored.
module tb_ideal_memory;
  localparam int WORDS = 64;

  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        we;
  logic [31:0] addr, din, dout;
  logic [31:0] model [WORDS];

  ideal_memory #(.WORDS(WORDS), .WIDTH(32)) dut (
    .clk(clk), .write_enable(we), .addr(addr), .data_in(din), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; din = 0;
    @(negedge clk);
    for (int i = 0; i < WORDS; i++) begin
      we = 1; addr = 32'(i) * 4; din = $urandom;
      model[i] = din;
      @(negedge clk);
    end
    we = 0;
    // Combinational read: several addresses within one clock phase.
    for (int i = 0; i < WORDS; i++) begin
      addr = 32'(WORDS - 1 - i) * 4 + 32'($urandom_range(0, 3));
      #0.5;
      checks++;
      if (dout !== model[WORDS - 1 - i]) begin
        failures++;
        $display("FAIL read addr=%h got %h exp %h", addr, dout, model[WORDS - 1 - i]);
      end
    end
    // Random writes and reads; disabled writes must not change anything.
    for (int k = 0; k < 500; k++) begin
      automatic int idx = $urandom_range(0, WORDS - 1);
      @(negedge clk);
      we = $urandom % 2; addr = 32'(idx) * 4; din = $urandom;
      #1;
      checks++;
      if (dout !== model[idx]) begin failures++; $display("FAIL pre-edge read %0d", idx); end
      @(posedge clk);
      if (we) model[idx] = din;
      #1;
      checks++;
      if (dout !== model[idx]) begin failures++; $display("FAIL post-edge read %0d got %h exp %h", idx, dout, model[idx]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
