// tb_compressor_4to2: exhaustive self-checking test of the 4:2 compressor.
// For all 32 input combinations it checks
//   - the column identity x1+x2+x3+x4+cin == sum + 2*(carry + cout),
//   - sum == parity of all five inputs,
//   - carry and cout against the compressor equations
//     (cout = x1 if x1 == x2 else x3; carry = cin if x1^x2^x3^x4 else x4),
//   - that cout is the same for cin = 0 and cin = 1 (no carry ripple).
// A watchdog ends the run with a failure.
module tb_compressor_4to2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4to2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                       .sum(sum), .carry(carry), .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout_at_cin0;
      for (int c = 0; c < 2; c++) begin
        int total, parity4;
        logic exp_cout, exp_carry;
        {x1, x2, x3, x4} = 4'(v);
        cin = 1'(c);
        #1;
        total    = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
        parity4  = (int'(x1) + int'(x2) + int'(x3) + int'(x4)) % 2;
        exp_cout = (x1 == x2) ? x1 : x3;
        exp_carry = (parity4 == 1) ? cin : x4;
        checks += 4;
        if (total != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("identity fails: x=%b%b%b%b cin=%b -> s=%b c=%b co=%b",
                   x1, x2, x3, x4, cin, sum, carry, cout);
        end
        if (sum !== total[0]) begin failures++; $display("sum wrong v=%0d c=%0d", v, c); end
        if (cout !== exp_cout) begin failures++; $display("cout wrong v=%0d c=%0d", v, c); end
        if (carry !== exp_carry) begin failures++; $display("carry wrong v=%0d c=%0d", v, c); end
        if (c == 0) cout_at_cin0 = cout;
        else begin
          checks++;
          if (cout !== cout_at_cin0) begin failures++; $display("cout depends on cin, v=%0d", v); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
