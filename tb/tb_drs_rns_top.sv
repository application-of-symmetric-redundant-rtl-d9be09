// tb_drs_rns_top: end-to-end test of drs_rns_top at its default parameters.
//
// RNS unit: random legitimate operands of RNS(2,3,5,7|11) with random
// pseudoresidue representatives; add, subtract, negate and multiply results
// are checked channel by channel, then each result is run through the
// redundant-modulus checker (no error for results in [0, 210), error for
// results pushed out of range or corrupted in one channel; the digits and
// the binary value of error-free results are checked) and the
// approximate CRT sign is compared. Multiplies must hold op_ready low.
// FIR channels (wide-total and BSD): a random 8-tap filter against the
// exact convolution.
// Converter bank (including the 32-bit word reducer and the 8-operand DRS
// adder) and residue-checked adder: random values against arithmetic
// references; injected faults must be flagged.
// Every mechanism is counted; one that never happens counts as a failure.
module tb_drs_rns_top;
  localparam int K = 4, NC = 5, RH = 4, H = 8, M = 251, TAPS = 8;
  int RMODS [NC] = '{2, 3, 5, 7, 11};
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic op_valid = 0, op_ready, res_valid, chk_start = 0, chk_done, chk_err, crt_neg;
  logic [1:0] op = 0;
  logic [RH:0] op_a [NC], op_b [NC], res_out [NC], chk_pred;
  logic [RH-1:0] chk_digits [K];
  logic [RH*K-1:0] chk_bin;
  logic [7:0] crt_frac;
  logic fir_valid = 0, fir_y_valid;
  logic [H:0] fir_x = 0, fir_y;
  logic [H:0] fir_coef [TAPS];
  logic [$clog2(TAPS+1)-1:0] fir_ovf_count, fir_bsd_corr_count;
  logic [H:0] fir_bsd_y; logic fir_bsd_y_valid;
  logic [31:0] cv_word = 0; logic [H:0] cv_word_drs;
  logic [2*H:0] cv_wide = 0; logic [H:0] cv_wide_drs; logic [H-1:0] cv_wide_sru;
  logic [H:0] cv_signed = 0, cv_signed_drs; logic [H-1:0] cv_unsigned = 0; logic [H:0] cv_unsigned_drs;
  logic [H+1:0] cv_tru = 0; logic [H:0] cv_tru_drs;
  logic [H:0] cv_ops [8] = '{default: '0}; logic [H:0] cv_ops_sum;
  logic [31:0] ca_a = 0, ca_b = 0, ca_inject = 0, ca_sum; logic [4:0] ca_ra = 0, ca_rb = 0, ca_rsum;
  logic ca_cout, ca_err;

  drs_rns_top dut (.*);

  // mechanism counters
  int n_add = 0, n_sub = 0, n_neg = 0, n_mul = 0, n_stall = 0, n_chk_ok = 0, n_chk_err = 0;
  int n_crt_neg = 0, n_crt_pos = 0, n_fir = 0, n_fir_ovf = 0, n_bsd_corr = 0, n_cv = 0, n_ca = 0, n_ca_det = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int pm(int a, int m); return ((a % m) + m) % m; endfunction
  function automatic int sv(logic [RH:0] v); return int'($signed(v)); endfunction

  task automatic load(ref logic [RH:0] o [NC], input int x);
    for (int c = 0; c < NC; c++) begin
      int r = pm(x, RMODS[c]);
      if ($urandom_range(0, 1)) r -= RMODS[c];
      o[c] = (RH+1)'(r);
    end
  endtask

  // corrupt >= 0 moves operand a of that channel to a different class
  task automatic do_op(int opc, int a, int b, int expv, int corrupt = -1);
    int lat = 0;
    load(op_a, a); load(op_b, b);
    if (corrupt >= 0)
      op_a[corrupt] = (RH+1)'(pm(sv(op_a[corrupt]) + 1, RMODS[corrupt]));
    op = 2'(opc); op_valid = 1;
    @(posedge clk); #1 op_valid = 0;
    while (!res_valid && lat < 100) begin
      if (!op_ready) n_stall++;
      @(posedge clk); #1 lat++;
    end
    checks++;
    if (!res_valid || lat != ((opc == 2) ? RH + 2 : 0)) begin
      failures++; $display("FAIL op %0d: no result or latency %0d", opc, lat);
    end
    for (int c = 0; c < NC; c++) begin
      if (c == corrupt) continue;
      checks++;
      if (sv(res_out[c]) < -RMODS[c] || sv(res_out[c]) >= RMODS[c] ||
          pm(sv(res_out[c]) - expv, RMODS[c]) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL op %0d a=%0d b=%0d ch %0d res=%0d", opc, a, b, c, sv(res_out[c]));
      end
    end
  endtask

  task automatic check_result(int v, bit expect_err);
    int lat = 0;
    chk_start = 1; @(posedge clk); #1 chk_start = 0;
    while (!chk_done && lat < 1000) begin @(posedge clk); #1 lat++; end
    checks++;
    if (chk_err != expect_err) begin
      failures++; $display("FAIL checker v=%0d err=%0b expected %0b op=%0d", v, chk_err, expect_err, op);
    end
    if (chk_err) n_chk_err++; else n_chk_ok++;
    if (!expect_err) begin
      int q = v;
      checks++;
      if (pm(sv(chk_pred) - v, 11) != 0) failures++;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (int'(chk_digits[i]) != q % RMODS[i]) failures++;
        q /= RMODS[i];
      end
      checks++;
      if (int'(chk_bin) != v) begin
        failures++; $display("FAIL binary %0d expected %0d", chk_bin, v);
      end
      // approximate sign of the result, away from the midpoint
      if (v < 100 || v > 110) begin
        checks++;
        if (crt_neg != (v >= 105)) begin failures++; $display("FAIL crt sign v=%0d", v); end
        if (crt_neg) n_crt_neg++; else n_crt_pos++;
      end
    end
  endtask

  initial begin
    int a, b;
    for (int c = 0; c < NC; c++) begin op_a[c] = 0; op_b[c] = 0; end
    for (int j = 0; j < TAPS; j++) fir_coef[j] = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;

    // ---------------- RNS unit
    for (int n = 0; n < 60; n++) begin
      a = int'($urandom_range(0, 209)); b = int'($urandom_range(0, 209 - a));
      do_op(0, a, b, a + b); n_add++; check_result(a + b, 0);
      b = int'($urandom_range(0, a));
      do_op(1, a, b, a - b); n_sub++; check_result(a - b, 0);
      do_op(3, a, 0, -a);    n_neg++; check_result(pm(-a, 210), a != 0);  // -a is outside [0, 210)
      a = int'($urandom_range(0, 20)); b = int'($urandom_range(0, 209 / (a + 1)));
      do_op(2, a, b, a * b); n_mul++; check_result(a * b, 0);
      // overflow out of the legitimate range: 150 + 100 = 250 >= 210
      do_op(0, 150 + (n % 50), 100, 250 + (n % 50)); n_add++; check_result(0, 1);
      // single corrupted channel
      do_op(0, a, 0, a, n % NC); n_add++;
      check_result(0, 1);
    end

    // ---------------- FIR channel
    begin
      int cv [TAPS], hist [TAPS], yv;
      longint ex;
      for (int j = 0; j < TAPS; j++) begin
        cv[j] = int'($urandom_range(0, 2*M - 1)) - M; fir_coef[j] = (H+1)'(cv[j]); hist[j] = 0;
      end
      for (int n = 0; n < 400; n++) begin
        int xv = int'($urandom_range(0, 2*M - 1)) - M;
        for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = xv; fir_x = (H+1)'(xv); fir_valid = 1;
        #1 if (fir_ovf_count != 0) n_fir_ovf++;
        if (fir_bsd_corr_count != 0) n_bsd_corr++;
        @(posedge clk); #1 fir_valid = 0;
        ex = 0;
        for (int j = 0; j < TAPS; j++) ex += longint'(cv[j]) * longint'(hist[j]);
        yv = int'($signed(fir_y));
        checks++; n_fir++;
        if (!fir_y_valid || yv < -M || yv >= M || ((longint'(yv) - ex) % longint'(M)) != 0) begin
          failures++; if (failures < 10) $display("FIR FAIL n=%0d", n);
        end
        yv = int'($signed(fir_bsd_y));
        checks++;
        if (!fir_bsd_y_valid || yv < -M || yv >= M || ((longint'(yv) - ex) % longint'(M)) != 0) begin
          failures++; if (failures < 10) $display("BSD FIR FAIL n=%0d", n);
        end
      end
    end

    // ---------------- converter bank
    for (int n = 0; n < 2000; n++) begin
      int w, s, u, t, yv, o;
      w = int'($urandom_range(0, 2**17 - 1)) - 2**16; cv_wide = 17'(w);
      s = int'($urandom_range(0, 511)) - 256;         cv_signed = 9'(s);
      u = int'($urandom_range(0, 255));               cv_unsigned = 8'(u);
      t = int'($urandom_range(0, 3*M - 1));           cv_tru = 10'(t);
      cv_word = $urandom();
      o = 0;
      for (int i = 0; i < 8; i++) begin
        int e = int'($urandom_range(0, 2*M - 1)) - M;
        if (n % 20 == 0) e = -M;
        cv_ops[i] = 9'(e); o += e;
      end
      #1;
      checks += 7; n_cv++;
      yv = int'($signed(cv_ops_sum));
      if (yv < -M || yv >= M || pm(yv - o, M) != 0) failures++;
      yv = int'($signed(cv_word_drs));
      if (yv < -M || yv >= M || ((longint'(yv) - longint'($signed(cv_word))) % longint'(M)) != 0) failures++;
      yv = int'($signed(cv_wide_drs));
      if (yv < -M || yv >= M || pm(yv - w, M) != 0) failures++;
      if (int'(cv_wide_sru) != pm(w, M)) failures++;
      yv = int'($signed(cv_signed_drs));
      if (yv < -M || yv >= M || pm(yv - s, M) != 0) failures++;
      yv = int'($signed(cv_unsigned_drs));
      if (yv < -M || yv >= M || pm(yv - u, M) != 0) failures++;
      yv = int'($signed(cv_tru_drs));
      if (yv < -M || yv >= M || pm(yv - t, M) != 0) failures++;
    end

    // ---------------- residue-checked adder
    for (int n = 0; n < 2000; n++) begin
      longint s;
      ca_a = $urandom(); ca_b = $urandom(); ca_inject = 0;
      ca_ra = 5'(pm(int'(longint'(ca_a) % 15), 15) - ((n % 2) ? 15 : 0));
      ca_rb = 5'(pm(int'(longint'(ca_b) % 15), 15) - ((n % 3) ? 15 : 0));
      #1 s = longint'(ca_a) + longint'(ca_b);
      checks++; n_ca++;
      if ({ca_cout, ca_sum} != 33'(s) || ca_err) failures++;
      ca_inject = 32'(1) << (n % 32); #1;
      checks++;
      if (!ca_err) failures++; else n_ca_det++;
    end

    // ---------------- mechanism coverage
    begin
      automatic int cnt [15] = '{n_bsd_corr, n_add, n_sub, n_neg, n_mul, n_stall, n_chk_ok, n_chk_err, n_crt_neg,
                       n_crt_pos, n_fir, n_fir_ovf, n_cv, n_ca, n_ca_det};
      string nm [15] = '{"bsd fir msb correction", "add", "subtract", "negate", "multiply", "multiply stall",
                         "check passed", "check error", "crt negative", "crt positive",
                         "fir output", "fir overflow correction", "conversion",
                         "checked add", "checked add fault detected"};
      for (int i = 0; i < 15; i++) begin
        $display("  %-28s %0d", nm[i], cnt[i]);
        checks++;
        if (cnt[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
