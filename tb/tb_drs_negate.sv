// tb_drs_negate: exhaustive check of DRS negation, including X = -m -> 0.
module tb_drs_negate;
  localparam int unsigned H = 8;
  int checks = 0, failures = 0;
  logic [H:0] x, y; logic [H-1:0] m;
  drs_negate #(.H(H)) dut (.x(x), .m(m), .y(y));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int mods [4] = '{129, 181, 251, 255};
    int yv;
    foreach (mods[k]) begin
      m = H'(mods[k]);
      for (int v = -mods[k]; v < mods[k]; v++) begin
        x = (H+1)'(v); #1;
        yv = int'($signed(y));
        checks++;
        if (yv < -mods[k] || yv >= mods[k] || ((yv + v) % mods[k]) != 0 ||
            (v == -mods[k] && yv != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d", mods[k], v, yv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
