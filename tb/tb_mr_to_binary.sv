// tb_mr_to_binary: exhaustive check of the mixed-radix to binary conversion
// for the default moduli 2, 3, 5, 7 (all 210 digit vectors) and for the
// moduli 3, 5, 7, 11, 13 (all 15015 digit vectors, 4-bit digits). Each
// result must equal the number whose ordinary mixed-radix digits were
// applied. The unit is combinational: the value is checked 1 time unit after
// the digits change.
module tb_mr_to_binary;
  int checks = 0, failures = 0;

  localparam int unsigned M4 [4] = '{2, 3, 5, 7};
  logic [3:0]  d4 [4];
  logic [15:0] v4;
  mr_to_binary #(.H(4), .K(4), .MOD(M4), .BW(16)) dut4 (.digits(d4), .value(v4));

  localparam int unsigned M5 [5] = '{3, 5, 7, 11, 13};
  logic [3:0]  d5 [5];
  logic [19:0] v5;
  mr_to_binary #(.H(4), .K(5), .MOD(M5)) dut5 (.digits(d5), .value(v5));

  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int q;
    for (int u = 0; u < 210; u++) begin
      q = u;
      for (int i = 0; i < 4; i++) begin
        d4[i] = 4'(q % int'(M4[i]));
        q = q / int'(M4[i]);
      end
      #1; checks++;
      if (int'(v4) != u) begin
        failures++;
        if (failures < 10) $display("FAIL K=4 u=%0d got %0d", u, v4);
      end
    end
    for (int u = 0; u < 15015; u++) begin
      q = u;
      for (int i = 0; i < 5; i++) begin
        d5[i] = 4'(q % int'(M5[i]));
        q = q / int'(M5[i]);
      end
      #1; checks++;
      if (int'(v5) != u) begin
        failures++;
        if (failures < 10) $display("FAIL K=5 u=%0d got %0d", u, v5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
