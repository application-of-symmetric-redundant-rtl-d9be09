// tb_approx_crt: for every x in [0, 210) and random pseudoresidue
// representatives in RNS(2,3,5,7), the F-bit approximate fraction must lie
// within K*2^-F below x/210 (modulo 1), and the sign output must match
// x >= 105 wherever x/210 is not within that error of 1/2.
module tb_approx_crt;
  localparam int unsigned H = 3, K = 4, F = 8;
  localparam int unsigned MOD [K] = '{2, 3, 5, 7};
  localparam int BIGM = 210;
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;
  logic [H:0] res [K];
  logic [F-1:0] frac; logic neg;
  approx_crt #(.H(H), .K(K), .MOD(MOD), .F(F)) dut (.res, .frac, .neg);
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int exact_scaled, err, r;
    for (int rep = 0; rep < 8; rep++)
      for (int x = 0; x < BIGM; x++) begin
        for (int i = 0; i < K; i++) begin
          r = x % int'(MOD[i]);
          if ((rep + i + x) % 3 == 0 || $urandom_range(0, 1)) r -= int'(MOD[i]);
          res[i] = (H+1)'(r);
        end
        #1;
        exact_scaled = (x * (1 << F)) / BIGM;           // floor(x/M * 2^F)
        err = (exact_scaled - int'(frac) + (1 << F)) % (1 << F);
        checks++;
        if (err > int'(K)) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d frac=%0d exact=%0d", x, frac, exact_scaled);
        end
        if (exact_scaled >= (1 << (F-1)) + int'(K) || exact_scaled < (1 << (F-1)) - 1) begin
          checks++;
          if (neg != (x >= BIGM / 2)) begin
            failures++;
            if (failures < 10) $display("FAIL sign x=%0d neg=%0b", x, neg);
          end
          if (neg) n_neg++; else n_pos++;
        end
      end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
