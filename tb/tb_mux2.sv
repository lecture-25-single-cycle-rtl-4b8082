// tb_mux2: self-checking test of the 2-to-1 multiplexer.
// Random data on both inputs; checks y against a for sel = 0 and b for sel = 1.
module tb_mux2;
  int checks = 0;
  int failures = 0;

  logic        sel;
  logic [31:0] a, b, y;

  mux2 #(.WIDTH(32)) dut (.sel(sel), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      a = $urandom; b = $urandom; sel = k[0];
      #1;
      checks++;
      if (y !== (k[0] ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
