// tb_mux2: exhaustive self-checking test of the 2:1 multiplexer.
// Applies all eight input combinations and checks y against d1 when s is
// set and d0 otherwise. A watchdog ends the run with a failure.
module tb_mux2;
  logic d0, d1, s, y;
  int checks = 0, failures = 0;

  mux2 dut (.d0(d0), .d1(d1), .s(s), .y(y));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [2:0] bits;
      bits = 3'(v);
      {s, d1, d0} = bits;
      #1;
      checks++;
      if (y !== bits[bits[2] ? 1 : 0]) begin
        failures++;
        $display("y wrong for s=%b d1=%b d0=%b", s, d1, d0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
