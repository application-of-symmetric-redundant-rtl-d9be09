// tb_drs_to_sru: exhaustive check of DRS -> ordinary residue conversion for
// several moduli of width H = 8: every X in [-m, m) must map to X mod m.
module tb_drs_to_sru;
  localparam int unsigned H = 8;
  int checks = 0, failures = 0;
  logic [H:0] x; logic [H-1:0] m, y;
  drs_to_sru #(.H(H)) dut (.x_drs(x), .m(m), .x_sru(y));
  initial begin
    #1_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int mods [5] = '{129, 173, 200, 251, 255};
    foreach (mods[k]) begin
      m = H'(mods[k]);
      for (int v = -mods[k]; v < mods[k]; v++) begin
        x = (H+1)'(v); #1;
        checks++;
        if (int'(y) != ((v % mods[k]) + mods[k]) % mods[k]) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d", mods[k], v, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
