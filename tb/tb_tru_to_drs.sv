// tb_tru_to_drs: exhaustive check of TRU [0, 3m) -> DRS conversion; also
// counts how often each of the three corrections (0, -m, -2m) was used.
module tb_tru_to_drs;
  localparam int unsigned H = 8;
  int checks = 0, failures = 0;
  int n_sel [3] = '{0, 0, 0};
  logic [H+1:0] yt; logic [H-1:0] m; logic [H:0] z;
  tru_to_drs #(.H(H)) dut (.y_tru(yt), .m(m), .z(z));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int mods [4] = '{129, 170, 251, 255};
    int zv;
    foreach (mods[k]) begin
      m = H'(mods[k]);
      for (int v = 0; v < 3 * mods[k]; v++) begin
        yt = (H+2)'(v); #1;
        zv = int'($signed(z));
        checks++;
        if (zv < -mods[k] || zv >= mods[k] || ((zv - v) % mods[k]) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d y=%0d z=%0d", mods[k], v, zv);
        end
        n_sel[(v - zv) / mods[k] > 2 ? 2 : (v - zv) / mods[k]]++;
      end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (n_sel[i] == 0) begin failures++; $display("FAIL correction %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
