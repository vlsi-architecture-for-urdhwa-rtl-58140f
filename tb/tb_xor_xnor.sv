// tb_xor_xnor: exhaustive self-checking test of the XOR-XNOR cell.
// Applies all four input pairs and compares both rails with the truth
// table (odd number of ones -> x = 1, xn = 0). A watchdog ends the run
// with a failure if it does not finish in time.
module tb_xor_xnor;
  logic a, b, x, xn;
  int checks = 0, failures = 0;

  xor_xnor dut (.a(a), .b(b), .x(x), .xn(xn));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic exp_x;
      {a, b} = 2'(v);
      #1;
      exp_x = (int'(a) + int'(b)) == 1;
      checks += 2;
      if (x !== exp_x)   begin failures++; $display("x wrong for a=%b b=%b", a, b); end
      if (xn !== !exp_x) begin failures++; $display("xn wrong for a=%b b=%b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
