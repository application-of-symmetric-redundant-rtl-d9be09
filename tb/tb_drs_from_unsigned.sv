// tb_drs_from_unsigned: exhaustive check of h-bit unsigned -> DRS reduction.
module tb_drs_from_unsigned;
  localparam int unsigned H = 8;
  int checks = 0, failures = 0;
  logic [H-1:0] x, m; logic [H:0] y;
  drs_from_unsigned #(.H(H)) dut (.x(x), .m(m), .y(y));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int mods [4] = '{128, 157, 251, 255};
    int yv;
    foreach (mods[k]) begin
      m = H'(mods[k]);
      for (int v = 0; v < 2**H; v++) begin
        x = H'(v); #1;
        yv = int'($signed(y));
        checks++;
        if (yv < -mods[k] || yv >= mods[k] || ((yv - v) % mods[k]) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d", mods[k], v, yv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
