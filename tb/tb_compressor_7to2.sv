// tb_compressor_7to2: exhaustive self-checking test of the 7:2 compressor.
// For all 512 combinations of x[6:0], cin1 and cin2 it checks
//   - the column identity sum(x) + cin1 + cin2 == sum + 2*carry + 4*(cout1 + cout2),
//   - sum == parity of the nine inputs.
// A watchdog ends the run with a failure.
module tb_compressor_7to2;
  logic [6:0] x;
  logic cin1, cin2, sum, carry, cout1, cout2;
  int checks = 0, failures = 0;

  compressor_7to2 dut (.x(x), .cin1(cin1), .cin2(cin2), .sum(sum), .carry(carry),
                       .cout1(cout1), .cout2(cout2));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int total, got;
      {cin2, cin1, x} = 9'(v);
      #1;
      total = int'(cin1) + int'(cin2);
      for (int i = 0; i < 7; i++) total += int'(x[i]);
      got = int'(sum) + 2 * int'(carry) + 4 * (int'(cout1) + int'(cout2));
      checks += 2;
      if (got != total) begin
        failures++;
        $display("identity fails: x=%b cin1=%b cin2=%b -> %0d, expected %0d",
                 x, cin1, cin2, got, total);
      end
      if (sum !== total[0]) begin failures++; $display("sum wrong v=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
