// tb_regfile: self-checking test of the 32 x 32-bit register file.
// Random writes and reads on both ports against an array model; checks that
// reads are combinational (same cycle), that a write lands only at the clock
// edge, that write_enable = 0 writes nothing and that register 0 stays zero.
module tb_regfile;
  int checks = 0;
  int failures = 0;

  logic        clk = 0;
  logic        rst;
  logic        we;
  logic [4:0]  ra, rb, rw;
  logic [31:0] bus_w, bus_a, bus_b;
  logic [31:0] model [32];

  regfile #(.NREGS(32), .WIDTH(32)) dut (
    .clk(clk), .rst(rst), .write_enable(we), .ra(ra), .rb(rb), .rw(rw),
    .bus_w(bus_w), .bus_a(bus_a), .bus_b(bus_b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    #1;
    checks++;
    if (bus_a !== model[ra] || bus_b !== model[rb]) begin
      failures++;
      $display("FAIL ra=%0d busA=%h exp %h  rb=%0d busB=%h exp %h",
               ra, bus_a, model[ra], rb, bus_b, model[rb]);
    end
  endtask

  initial begin
    rst = 1; we = 0; ra = 0; rb = 0; rw = 0; bus_w = 0;
    foreach (model[i]) model[i] = '0;
    @(negedge clk);
    rst = 0;
    // Fill every register, then read them all back.
    for (int i = 0; i < 32; i++) begin
      we = 1; rw = 5'(i); bus_w = $urandom;
      ra = 5'(i); rb = 5'(i);
      check_reads();                   // before the edge: old value
      @(posedge clk);
      if (i != 0) model[i] = bus_w;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 32; i++) begin
      ra = 5'(i); rb = 5'(31 - i);
      check_reads();
    end
    // Random traffic.
    for (int k = 0; k < 1000; k++) begin
      we = $urandom % 2; rw = 5'($urandom); bus_w = $urandom;
      ra = 5'($urandom); rb = (k % 5 == 0) ? rw : 5'($urandom);
      check_reads();
      @(posedge clk);
      if (we && rw != 0) model[rw] = bus_w;
      @(negedge clk);
      check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
