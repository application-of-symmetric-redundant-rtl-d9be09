// tb_drs_adder: exhaustive check of the DRS adder/subtractor for H = 5 over
// every modulus 17..31 and every operand pair in [-m, m), plus random checks
// at H = 8. The sum must be congruent to X +/- Y and lie in [-m, m). Each of
// the three corrections (0, +m, -m) must occur.
module tb_drs_adder;
  int checks = 0, failures = 0;
  int n_corr [3] = '{0, 0, 0};

  localparam int unsigned HS = 5;
  logic [HS:0] xs, ys, ss; logic [HS-1:0] ms; logic subs;
  drs_adder #(.H(HS)) dut_s (.x(xs), .y(ys), .m(ms), .sub(subs), .s(ss));

  localparam int unsigned HL = 8;
  logic [HL:0] xl, yl, sl; logic [HL-1:0] ml; logic subl;
  drs_adder #(.H(HL)) dut_l (.x(xl), .y(yl), .m(ml), .sub(subl), .s(sl));

  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(int x, int y, int m, bit sb, int s);
    int exp = sb ? x - y : x + y;
    checks++;
    if (s < -m || s >= m || ((s - exp) % m) != 0) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d sub=%0d s=%0d", m, x, y, sb, s);
    end
    if (s == exp) n_corr[0]++; else if (s > exp) n_corr[1]++; else n_corr[2]++;
  endtask

  initial begin
    for (int m = 17; m < 32; m++)
      for (int sb = 0; sb < 2; sb++)
        for (int x = -m; x < m; x++)
          for (int y = -m; y < m; y++) begin
            xs = (HS+1)'(x); ys = (HS+1)'(y); ms = HS'(m); subs = sb[0]; #1;
            check(x, y, m, sb[0], int'($signed(ss)));
          end
    for (int n = 0; n < 20000; n++) begin
      int m, x, y;
      m = 129 + int'($urandom_range(0, 126));
      x = int'($urandom_range(0, 2*m - 1)) - m;
      y = int'($urandom_range(0, 2*m - 1)) - m;
      if (n % 10 == 0) x = -m;
      xl = (HL+1)'(x); yl = (HL+1)'(y); ml = HL'(m); subl = n[0]; #1;
      check(x, y, m, n[0], int'($signed(sl)));
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_corr[i] == 0) begin failures++; $display("FAIL correction %0d never seen", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
