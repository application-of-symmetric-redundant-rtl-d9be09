// tb_bsd_adder: exhaustive check of the carry-free BSD adder and of the
// MSB-driven BSD correction at H = 4, for the moduli 9 and 15 (the ends of
// the range 2^(H-1) < M < 2^H).
//
// bsd_correct: every (P, N) pair of 6-bit components whose value lies in
// (-2^(H+1), 2^(H+1)) must come out congruent mod M and inside (-M, M).
// bsd_adder: every corrected total in (-M, M), in every BSD encoding, plus
// every product-shaped operand (Y+ below 2^(H-1), Y- in [1, M]) must give
// the exact sum. Both units are combinational; the non-zero correction must
// occur for both signs.
module tb_bsd_adder;
  localparam int H = 4, W = H + 2;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;

  initial begin
    #50_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [W-1:0] cp, cn, cp9, cn9, cp15, cn15;
  logic         corr9, corr15;
  bsd_correct #(.H(H), .M(9))  u_c9  (.p_in(cp), .n_in(cn), .p_out(cp9),  .n_out(cn9),  .corr(corr9));
  bsd_correct #(.H(H), .M(15)) u_c15 (.p_in(cp), .n_in(cn), .p_out(cp15), .n_out(cn15), .corr(corr15));

  logic [W-1:0] ap, an, bp, bn, sp, sn;
  bsd_adder #(.W(W), .WO(W), .J(H - 1)) u_add (.a_p(ap), .a_n(an), .b_p(bp), .b_n(bn), .s_p(sp), .s_n(sn));

  task automatic check_corr(int v, int m, logic [W-1:0] p, logic [W-1:0] n, logic c);
    int r = int'(p) - int'(n);
    checks++;
    if (r <= -m || r >= m || ((r - v) % m) != 0) begin
      failures++;
      if (failures < 10) $display("FAIL correct m=%0d in=%0d out=%0d", m, v, r);
    end
    if (c && r < v) n_pos++;
    if (c && r > v) n_neg++;
  endtask

  initial begin
    for (int p = 0; p < 2**W; p++)
      for (int n = 0; n < 2**W; n++)
        if (p - n > -(2**(H+1)) && p - n < 2**(H+1)) begin
          cp = W'(p); cn = W'(n); #1;
          check_corr(p - n, 9, cp9, cn9, corr9);
          check_corr(p - n, 15, cp15, cn15, corr15);
        end
    for (int m = 9; m < 16; m += 6)
      for (int p = 0; p < 2**W; p++)
        for (int n = 0; n < 2**W; n++)
          if (p - n > -m && p - n < m)
            for (int yp = 0; yp < 2**(H-1); yp++)
              for (int yn = 1; yn <= m; yn++) begin
                ap = W'(p); an = W'(n); bp = W'(yp); bn = W'(yn); #1;
                checks++;
                if (int'(sp) - int'(sn) != p - n + yp - yn) begin
                  failures++;
                  if (failures < 10) $display("FAIL add %0d-%0d + %0d-%0d = %0d-%0d", p, n, yp, yn, sp, sn);
                end
              end
    checks++;
    if (n_pos == 0 || n_neg == 0) begin
      failures++; $display("FAIL correction not seen in both directions");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
