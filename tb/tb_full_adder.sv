// tb_full_adder: exhaustive self-checking test of the full adder.
// For all eight input combinations checks that a + b + c == s + 2*co,
// computed with integer arithmetic. A watchdog ends the run with a failure.
module tb_full_adder;
  logic a, b, c, s, co;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .s(s), .co(co));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int total;
      {a, b, c} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(c);
      checks += 2;
      if (s !== total[0])  begin failures++; $display("s wrong for %b%b%b", a, b, c); end
      if (co !== total[1]) begin failures++; $display("co wrong for %b%b%b", a, b, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
