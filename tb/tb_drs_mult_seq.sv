// tb_drs_mult_seq: checks the bit-serial DRS multiply-adder.
// H = 4: exhaustive over moduli 9..15, all X, Y in [-m, m), A in {0, random}.
// H = 8: random operands and moduli. P must be congruent to X*Y + A and lie
// in [-m, m); done must come exactly H+1 clocks after start.
module tb_drs_mult_seq;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int unsigned HS = 4, HL = 8;
  logic          st_s, busy_s, done_s; logic [HS:0] xs, ys, ps; logic [HS-1:0] as_, ms;
  logic          st_l, busy_l, done_l; logic [HL:0] xl, yl, pl; logic [HL-1:0] al, ml;
  drs_mult_seq #(.H(HS)) dut_s (.clk, .rst_n, .start(st_s), .x(xs), .y(ys), .a(as_), .m(ms),
                                .busy(busy_s), .done(done_s), .p(ps));
  drs_mult_seq #(.H(HL)) dut_l (.clk, .rst_n, .start(st_l), .x(xl), .y(yl), .a(al), .m(ml),
                                .busy(busy_l), .done(done_l), .p(pl));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(int x, int y, int a, int m, int p, int lat, int exp_lat);
    checks++;
    if (p < -m || p >= m || ((p - (x*y + a)) % m) != 0 || lat != exp_lat) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d x=%0d y=%0d a=%0d p=%0d lat=%0d", m, x, y, a, p, lat);
    end
  endtask

  task automatic run_s(int x, int y, int a, int m);
    int lat = 0;
    xs = (HS+1)'(x); ys = (HS+1)'(y); as_ = HS'(a); ms = HS'(m);
    st_s = 1; @(posedge clk); #1 st_s = 0;
    do begin @(posedge clk); lat++; #1; end while (!done_s && lat < 100);
    check(x, y, a, m, int'($signed(ps)), lat, HS + 1);
  endtask

  task automatic run_l(int x, int y, int a, int m);
    int lat = 0;
    xl = (HL+1)'(x); yl = (HL+1)'(y); al = HL'(a); ml = HL'(m);
    st_l = 1; @(posedge clk); #1 st_l = 0;
    do begin @(posedge clk); lat++; #1; end while (!done_l && lat < 100);
    check(x, y, a, m, int'($signed(pl)), lat, HL + 1);
  endtask

  initial begin
    st_s = 0; st_l = 0; xs = 0; ys = 0; as_ = 0; ms = 9; xl = 0; yl = 0; al = 0; ml = 129;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    for (int m = 9; m < 16; m++)
      for (int x = -m; x < m; x++)
        for (int y = -m; y < m; y++)
          run_s(x, y, ((x + y) & 1) ? int'($urandom_range(0, 15)) : 0, m);
    for (int n = 0; n < 3000; n++) begin
      int m = 129 + int'($urandom_range(0, 126));
      int x = int'($urandom_range(0, 2*m - 1)) - m;
      int y = int'($urandom_range(0, 2*m - 1)) - m;
      if (n < 4) begin x = -m; y = (n[0]) ? -m : m - 1; end
      run_l(x, y, int'($urandom_range(0, 255)), m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
