// tb_drs_reduce_lut: checks table-based reduction of (2h+1)-bit two's
// complement numbers, at the default H = 8, M = 251 (exhaustive over all
// 2^17 inputs) and at H = 5, M = 19 (exhaustive).
module tb_drs_reduce_lut;
  int checks = 0, failures = 0;
  localparam int unsigned H1 = 8, M1 = 251;
  localparam int unsigned H2 = 5, M2 = 19;
  logic [2*H1:0] x1; logic [H1:0] y1;
  logic [2*H2:0] x2; logic [H2:0] y2;
  drs_reduce_lut #(.H(H1), .M(M1)) dut1 (.x(x1), .y(y1));
  drs_reduce_lut #(.H(H2), .M(M2)) dut2 (.x(x2), .y(y2));

  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(int v, int m, int y);
    checks++;
    if (y < -m || y >= m || ((y - v) % m) != 0) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d", m, v, y);
    end
  endtask

  initial begin
    for (int v = -(2**(2*H1)); v < 2**(2*H1); v++) begin
      x1 = (2*H1+1)'(v); #1; check(v, M1, int'($signed(y1)));
    end
    for (int v = -(2**(2*H2)); v < 2**(2*H2); v++) begin
      x2 = (2*H2+1)'(v); #1; check(v, M2, int'($signed(y2)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
