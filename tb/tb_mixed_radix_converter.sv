// tb_mixed_radix_converter: RNS(7,5,3,2) -> mixed-radix conversion.
// First the worked example u = 13 given as pseudoresidues (6, -2, -2, 1),
// whose redundant digits must represent 13 (mod 210); then every
// u in [0, 210) with random choice of representative for each residue. The
// digits must lie in [-m_i, m_i) and satisfy sum v_i w_i = u (mod 210). The
// latency must be (K-1)*(H+3) clocks.
module tb_mixed_radix_converter;
  localparam int unsigned H = 3, K = 4;
  localparam int unsigned MOD [K] = '{2, 3, 5, 7};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [H:0] res_in [K];
  logic [H:0] digits [K];
  always #5 clk = ~clk;
  mixed_radix_converter #(.H(H), .K(K), .MOD(MOD)) dut (.clk, .rst_n, .start, .res_in,
                                                       .busy, .done, .digits);
  initial begin
    repeat (100_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic convert(int r [K], output int v [K], output int lat);
    for (int i = 0; i < K; i++) res_in[i] = (H+1)'(r[i]);
    start = 1; @(posedge clk); #1 start = 0; lat = 0;
    do begin @(posedge clk); lat++; #1; end while (!done && lat < 1000);
    for (int i = 0; i < K; i++) v[i] = int'($signed(digits[i]));
  endtask

  initial begin
    int r [K], v [K], lat, val, w;
    int exp_lat = (K - 1) * (H + 3);
    repeat (2) @(posedge clk); #1 rst_n = 1;
    // worked example: residues mod 2, 3, 5, 7 = 1, -2, -2, 6
    r = '{1, -2, -2, 6};
    convert(r, v, lat);
    $display("example digits (m0..m3): %0d %0d %0d %0d, latency %0d", v[0], v[1], v[2], v[3], lat);
    checks++;
    if (((v[0] + 2*v[1] + 6*v[2] + 30*v[3] - 13) % 210) != 0 || lat != exp_lat) begin
      failures++; $display("FAIL worked example");
    end
    for (int rep = 0; rep < 4; rep++)
      for (int u = 0; u < 210; u++) begin
        for (int i = 0; i < K; i++) begin
          r[i] = u % int'(MOD[i]);
          if ($urandom_range(0, 1)) r[i] -= int'(MOD[i]);
        end
        convert(r, v, lat);
        val = 0; w = 1;
        for (int i = 0; i < K; i++) begin
          checks++;
          if (v[i] < -int'(MOD[i]) || v[i] >= int'(MOD[i])) failures++;
          val += v[i] * w; w *= int'(MOD[i]);
        end
        checks++;
        if ((((val - u) % 210) != 0) || lat != exp_lat) begin
          failures++;
          if (failures < 10) $display("FAIL u=%0d val=%0d lat=%0d", u, val, lat);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
