// tb_residue_encoder: random and corner 32-bit words; the DRS check residue
// must be congruent to the word mod 15 and lie in [-15, 15).
module tb_residue_encoder;
  localparam int unsigned W = 32, H = 4;
  int checks = 0, failures = 0;
  logic [W-1:0] word; logic [H:0] res;
  residue_encoder #(.W(W), .H(H)) dut (.word, .res);
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int rv;
    for (int n = 0; n < 50000; n++) begin
      word = $urandom();
      if (n == 0) word = '0;
      if (n == 1) word = '1;
      if (n == 2) word = 32'h0000_000F;
      if (n < 300 && n > 2) word = W'(n - 3);
      #1;
      rv = int'($signed(res));
      checks++;
      if (rv < -15 || rv >= 15 || ((longint'(rv) - longint'(word)) % 15) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL word=%h res=%0d", word, rv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
