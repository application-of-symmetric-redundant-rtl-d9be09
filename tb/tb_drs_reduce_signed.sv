// tb_drs_reduce_signed: exhaustive check of (h+1)-bit two's complement ->
// DRS reduction (H = 8): output congruent to the input mod m and in [-m, m).
module tb_drs_reduce_signed;
  localparam int unsigned H = 8;
  int checks = 0, failures = 0;
  logic [H:0] x, y; logic [H-1:0] m;
  drs_reduce_signed #(.H(H)) dut (.x(x), .m(m), .y(y));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int mods [5] = '{128, 131, 200, 251, 255};
    int yv;
    foreach (mods[k]) begin
      m = H'(mods[k]);
      for (int v = -(2**H); v < 2**H; v++) begin
        x = (H+1)'(v); #1;
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
