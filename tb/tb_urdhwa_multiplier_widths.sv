// tb_urdhwa_multiplier_widths: exhaustive test of the multiplier at the
// other supported widths, N = 2 to 7. One instance per width is driven
// with every operand pair and its product compared with a * b. A watchdog
// ends the run with a failure if it does not finish in time.
module tb_urdhwa_multiplier_widths;
  logic [6:0]  a;
  logic [6:0]  b;
  logic [13:0] p [2:7];
  int checks = 0, failures = 0;

  urdhwa_multiplier #(.N(2)) u_n2 (.a(a[1:0]), .b(b[1:0]), .p(p[2][3:0]));
  urdhwa_multiplier #(.N(3)) u_n3 (.a(a[2:0]), .b(b[2:0]), .p(p[3][5:0]));
  urdhwa_multiplier #(.N(4)) u_n4 (.a(a[3:0]), .b(b[3:0]), .p(p[4][7:0]));
  urdhwa_multiplier #(.N(5)) u_n5 (.a(a[4:0]), .b(b[4:0]), .p(p[5][9:0]));
  urdhwa_multiplier #(.N(6)) u_n6 (.a(a[5:0]), .b(b[5:0]), .p(p[6][11:0]));
  urdhwa_multiplier #(.N(7)) u_n7 (.a(a[6:0]), .b(b[6:0]), .p(p[7][13:0]));

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 128; ia++) begin
      for (int ib = 0; ib < 128; ib++) begin
        a = 7'(ia);
        b = 7'(ib);
        #1;
        for (int n = 2; n <= 7; n++) begin
          int ma, mb, got;
          ma = ia % (1 << n);
          mb = ib % (1 << n);
          // Only the low 2n bits of p[n] are driven by instance n.
          got = int'(p[n]) % (1 << (2 * n));
          checks++;
          if (got != ma * mb) begin
            failures++;
            if (failures < 10) $display("N=%0d a=%0d b=%0d: p=%0d expected %0d", n, ma, mb, got, ma * mb);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
