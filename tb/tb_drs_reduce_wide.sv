// tb_drs_reduce_wide: reduction of 32-bit two's-complement numbers to DRS
// mod 251 (defaults) and of 20-bit numbers mod 19 with H = 5 (odd segment
// count, an unpaired residue). Random and corner values; the result must be
// congruent to the input and lie in [-m, m).
module tb_drs_reduce_wide;
  int checks = 0, failures = 0;
  logic [31:0] x1; logic [8:0] y1;
  logic [19:0] x2; logic [5:0] y2;
  drs_reduce_wide dut1 (.x(x1), .y(y1));
  drs_reduce_wide #(.K(20), .H(5), .M(19)) dut2 (.x(x2), .y(y2));
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic check(longint v, int m, int y);
    checks++;
    if (y < -m || y >= m || ((longint'(y) - v) % longint'(m)) != 0) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d", m, v, y);
    end
  endtask
  initial begin
    for (int n = 0; n < 50000; n++) begin
      x1 = $urandom(); x2 = 20'($urandom());
      if (n == 0) begin x1 = 32'h8000_0000; x2 = 20'h80000; end
      if (n == 1) begin x1 = 32'h7fff_ffff; x2 = 20'h7ffff; end
      if (n == 2) begin x1 = '1; x2 = '1; end
      if (n == 3) begin x1 = '0; x2 = '0; end
      #1;
      check(longint'($signed(x1)), 251, int'($signed(y1)));
      check(longint'($signed(x2)), 19, int'($signed(y2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
