// tb_rrns_checker: RNS(2,3,5,7) with redundant modulus 11. For every
// legitimate x in [0, 210), with random pseudoresidue representatives, the
// checker must report no error, predict x mod 11 and return the ordinary
// mixed-radix digits of x. With one residue (any channel, the redundant one
// included) changed to a different class it must report an error.
// Latency from start to done is checked against 2*(K-1)*(H+3)+2 clocks.
module tb_rrns_checker;
  localparam int unsigned H = 4, K = 4;
  localparam int unsigned MOD [K+1] = '{2, 3, 5, 7, 11};
  int checks = 0, failures = 0, n_err = 0, n_ok = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done, err;
  logic [H:0] res_in [K+1];
  logic [H:0] pred;
  logic [H-1:0] mr_digits [K];
  always #5 clk = ~clk;
  rrns_checker #(.H(H), .K(K), .MOD(MOD)) dut (.clk, .rst_n, .start, .res_in, .busy, .done,
                                              .err, .pred, .mr_digits);
  initial begin
    repeat (200_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(int r [K+1], output int lat);
    for (int i = 0; i <= K; i++) res_in[i] = (H+1)'(r[i]);
    start = 1; @(posedge clk); #1 start = 0; lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!done && lat < 1000);
  endtask

  initial begin
    int r [K+1], lat, q, c, k;
    int exp_lat = 2 * (K - 1) * (H + 3) + 2;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int rep = 0; rep < 3; rep++)
      for (int x = 0; x < 210; x++) begin
        for (int i = 0; i <= K; i++) begin
          r[i] = x % int'(MOD[i]);
          if ($urandom_range(0, 1)) r[i] -= int'(MOD[i]);
        end
        run(r, lat);
        checks++;
        if (err || lat != exp_lat || ((int'($signed(pred)) - x) % 11) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d err=%0b pred=%0d lat=%0d", x, err, $signed(pred), lat);
        end else n_ok++;
        q = x;
        for (int i = 0; i < K; i++) begin
          checks++;
          if (int'(mr_digits[i]) != q % int'(MOD[i])) begin
            failures++;
            if (failures < 10) $display("FAIL x=%0d digit %0d = %0d", x, i, mr_digits[i]);
          end
          q = q / int'(MOD[i]);
        end
        // single residue error
        c = int'($urandom_range(0, K));
        k = int'($urandom_range(1, MOD[c] - 1));
        r[c] = (x + k) % int'(MOD[c]);
        if ($urandom_range(0, 1)) r[c] -= int'(MOD[c]);
        run(r, lat);
        checks++;
        if (!err) begin
          failures++;
          if (failures < 10) $display("FAIL undetected: x=%0d channel %0d", x, c);
        end else n_err++;
      end
    $display("clean words %0d, detected errors %0d", n_ok, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
