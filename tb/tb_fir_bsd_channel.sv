// tb_fir_bsd_channel: streams random DRS samples through the default 8-tap,
// modulus-251 BSD FIR residue channel and compares every output with the
// exact convolution sum_j c_j x[n-j] reduced mod 251. The output must appear
// one clock after its input and lie in [-m, m); the MSB-driven correction of
// the running totals must be exercised.
module tb_fir_bsd_channel;
  localparam int unsigned H = 8, M = 251, TAPS = 8;
  int checks = 0, failures = 0, n_corr = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, y_valid;
  logic [H:0] x_in, y_out;
  logic [H:0] coef [TAPS];
  logic [$clog2(TAPS+1)-1:0] corr_count;
  always #5 clk = ~clk;
  fir_bsd_channel #(.H(H), .M(M), .TAPS(TAPS)) dut (.clk, .rst_n, .in_valid, .x_in, .coef,
                                                 .y_out, .y_valid, .corr_count);
  initial begin
    repeat (200_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cv [TAPS];
  int hist [TAPS];
  initial begin
    longint exact;
    int yv;
    for (int j = 0; j < TAPS; j++) begin
      cv[j] = int'($urandom_range(0, 2*M - 1)) - int'(M);
      coef[j] = (H+1)'(cv[j]);
      hist[j] = 0;
    end
    cv[0] = -int'(M); coef[0] = (H+1)'(cv[0]);
    x_in = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int xv = int'($urandom_range(0, 2*M - 1)) - int'(M);
      if (n % 50 < 10) xv = (n % 2) ? -int'(M) : int'(M) - 1;   // extreme runs
      for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
      hist[0] = xv;
      x_in = (H+1)'(xv); in_valid = 1;
      #1 if (corr_count != 0) n_corr++;
      @(posedge clk); #1;
      in_valid = 0;
      exact = 0;
      for (int j = 0; j < TAPS; j++) exact += longint'(cv[j]) * longint'(hist[j]);
      yv = int'($signed(y_out));
      checks++;
      if (!y_valid || yv < -int'(M) || yv >= int'(M) || ((longint'(yv) - exact) % longint'(M)) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%0d exact=%0d valid=%0b", n, yv, exact, y_valid);
      end
      if (n % 7 == 3) begin          // idle cycle: the filter must hold
        @(posedge clk); #1;
        checks++;
        if (y_valid || int'($signed(y_out)) != yv) failures++;
      end
    end
    checks++;
    if (n_corr == 0) begin failures++; $display("FAIL MSB correction never used"); end
    $display("cycles with MSB correction: %0d", n_corr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
