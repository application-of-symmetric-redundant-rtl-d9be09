// tb_drs_mac_cell: sequential inner products on one MAC cell (acc_out fed
// back to acc_in). After each step the wide total must be congruent to the
// exact inner product so far; the 2^h*m overflow correction must occur in
// both directions. Also checks the one-clock update timing.
module tb_drs_mac_cell;
  localparam int unsigned H = 8;
  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  logic clk = 0, rst_n = 0, en = 0, ovf;
  logic [H:0] x, y; logic [H-1:0] m; logic [2*H:0] acc;
  always #5 clk = ~clk;
  drs_mac_cell #(.H(H)) dut (.clk, .rst_n, .en, .x, .y, .m, .acc_in(acc), .acc_out(acc), .ovf);

  initial begin
    repeat (500_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint exact;
    int mm, xv, yv;
    x = 0; y = 0; m = 251;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int trial = 0; trial < 200; trial++) begin
      // restart from zero
      rst_n = 0; #1 rst_n = 1;
      mm = 129 + int'($urandom_range(0, 126));
      m = H'(mm); exact = 0;
      for (int s = 0; s < 40; s++) begin
        xv = int'($urandom_range(0, 2*mm - 1)) - mm;
        yv = int'($urandom_range(0, 2*mm - 1)) - mm;
        if (trial % 4 == 1) begin xv = mm - 1; yv = mm - 1; end   // drive positive overflow
        if (trial % 4 == 2) begin xv = -mm; yv = mm - 1; end      // drive negative overflow
        x = (H+1)'(xv); y = (H+1)'(yv); en = 1;
        #1;
        if (ovf && $signed(acc) > 0) n_pos++;
        if (ovf && $signed(acc) < 0) n_neg++;
        @(posedge clk); #1 en = 0;
        exact += longint'(xv) * longint'(yv);
        checks++;
        if (((longint'($signed(acc)) - exact) % mm) != 0) begin
          failures++;
          if (failures < 10) $display("FAIL m=%0d step %0d acc=%0d exact=%0d", mm, s, $signed(acc), exact);
        end
        // hold: no change without en
        @(posedge clk); #1;
        checks++;
        if (((longint'($signed(acc)) - exact) % mm) != 0) failures++;
      end
    end
    checks += 2;
    if (n_pos == 0) begin failures++; $display("FAIL positive overflow correction never used"); end
    if (n_neg == 0) begin failures++; $display("FAIL negative overflow correction never used"); end
    $display("overflow corrections: +%0d -%0d", n_pos, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
