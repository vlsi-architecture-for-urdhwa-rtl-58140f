// tb_urdhwa_multiplier: end-to-end test of the multiplier at its default
// width (N = 8). Applies every one of the 65,536 operand pairs, compares
// the product with a * b computed by the simulator, and counts how often
// each internal mechanism was exercised:
//   - a 7:2 compressor receiving a carry-in from two columns below,
//   - a 7:2 compressor driving both carry-outs at once,
//   - a 4:2 compressor receiving a carry-in from the column below,
//   - the last partial-product row (b[7]) entering the 4:2 stage,
//   - a carry rippling through the final adder.
// A mechanism that never happened counts as a failure. A watchdog ends
// the run with a failure if it does not finish in time.
module tb_urdhwa_multiplier;
  localparam int unsigned N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  int n_c72_cin = 0, n_c72_two_couts = 0, n_c42_cin = 0, n_row7 = 0, n_cpa_carry = 0;

  urdhwa_multiplier dut (.a(a), .b(b), .p(p));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        logic [2*N-1:0] expected;
        a = N'(ia);
        b = N'(ib);
        #1;
        expected = (2*N)'(ia * ib);
        checks++;
        if (p !== expected) begin
          failures++;
          if (failures < 10) $display("a=%0d b=%0d: p=%0d expected %0d", a, b, p, expected);
        end
        if ((dut.s1_co1 | dut.s1_co2) != '0) n_c72_cin++;
        if ((dut.s1_co1 & dut.s1_co2) != '0) n_c72_two_couts++;
        if (dut.s2_co != '0) n_c42_cin++;
        if (b[N-1] && a != '0) n_row7++;
        if (dut.u_cpa.c[2*N-1:1] != '0) n_cpa_carry++;
      end
    end
    $display("7:2 carry-in used: %0d, 7:2 both carry-outs: %0d, 4:2 carry-in used: %0d",
             n_c72_cin, n_c72_two_couts, n_c42_cin);
    $display("last row into 4:2 stage: %0d, final-adder carries: %0d", n_row7, n_cpa_carry);
    checks += 5;
    if (n_c72_cin == 0)       begin failures++; $display("7:2 carry-in never used"); end
    if (n_c72_two_couts == 0) begin failures++; $display("7:2 never drove both carry-outs"); end
    if (n_c42_cin == 0)       begin failures++; $display("4:2 carry-in never used"); end
    if (n_row7 == 0)          begin failures++; $display("last row never non-zero"); end
    if (n_cpa_carry == 0)     begin failures++; $display("final adder never carried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
