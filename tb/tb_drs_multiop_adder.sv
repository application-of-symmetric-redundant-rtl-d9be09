// tb_drs_multiop_adder: random check of the DRS multioperand adder for
// N = 8 (balanced tree) and N = 5 (unbalanced), H = 8, with random moduli in
// (128, 256) and random operands in [-m, m), including runs where every
// operand is -m or m-1. The sum must be congruent to the integer sum of the
// operands and lie in [-m, m). Combinational: checked 1 time unit after the
// inputs change.
module tb_drs_multiop_adder;
  localparam int H = 8;
  int checks = 0, failures = 0;

  logic [H:0] x8 [8], x5 [5], s8, s5;
  logic [H-1:0] m;
  drs_multiop_adder #(.H(H), .N(8)) dut8 (.x(x8), .m(m), .s(s8));
  drs_multiop_adder #(.H(H), .N(5)) dut5 (.x(x5), .m(m), .s(s5));

  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(int n, int sum, int got, int mv);
    checks++;
    if (got < -mv || got >= mv || ((got - sum) % mv) != 0) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d m=%0d sum=%0d got=%0d", n, mv, sum, got);
    end
  endtask

  initial begin
    int mv, v, sum8, sum5;
    for (int t = 0; t < 20000; t++) begin
      mv = int'($urandom_range(129, 255));
      m = H'(mv);
      sum8 = 0; sum5 = 0;
      for (int i = 0; i < 8; i++) begin
        v = int'($urandom_range(0, 2*mv - 1)) - mv;
        if (t % 10 == 1) v = -mv;
        if (t % 10 == 2) v = mv - 1;
        x8[i] = (H+1)'(v); sum8 += v;
        if (i < 5) begin x5[i] = (H+1)'(v); sum5 += v; end
      end
      #1;
      check(8, sum8, int'($signed(s8)), mv);
      check(5, sum5, int'($signed(s5)), mv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
