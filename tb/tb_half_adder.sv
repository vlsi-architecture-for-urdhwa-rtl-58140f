// tb_half_adder: exhaustive self-checking test of the half adder.
// For all four input pairs checks that a + b == s + 2*co, computed with
// integer arithmetic. A watchdog ends the run with a failure.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {a, b} = 2'(v);
      #1;
      total = int'(a) + int'(b);
      checks += 2;
      if (s !== total[0])  begin failures++; $display("s wrong for a=%b b=%b", a, b); end
      if (co !== total[1]) begin failures++; $display("co wrong for a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
