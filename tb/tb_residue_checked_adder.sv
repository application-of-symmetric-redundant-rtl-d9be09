// tb_residue_checked_adder: fault-free additions (random operands, random
// DRS check residues, carries out) must give the right sum, a predicted
// residue congruent to the sum (with carry-out removed) and no error; each
// single-bit fault injected into the sum, and each corrupted operand
// residue, must raise err.
module tb_residue_checked_adder;
  localparam int unsigned W = 32, H = 4;
  int checks = 0, failures = 0, n_cout = 0, n_det = 0;
  logic [W-1:0] a, b, inj, sum; logic [H:0] ra, rb, rsum; logic cout, err;
  residue_checked_adder #(.W(W), .H(H)) dut (.a, .b, .ra, .rb, .err_inject(inj),
                                             .sum, .cout, .rsum, .err);
  initial begin
    #10_000_000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic int drs_res(logic [W-1:0] v);
    int r = int'(longint'(v) % 15);
    if ($urandom_range(0, 1)) r -= 15;
    return r;
  endfunction
  initial begin
    longint s;
    for (int n = 0; n < 20000; n++) begin
      a = $urandom(); b = $urandom(); inj = '0;
      ra = (H+1)'(drs_res(a)); rb = (H+1)'(drs_res(b));
      #1;
      s = longint'(a) + longint'(b);
      if (cout) n_cout++;
      checks++;
      if ({cout, sum} != 33'(s) || err ||
          ((longint'($signed(rsum)) - longint'(sum)) % 15) != 0) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h sum=%h err=%0b rsum=%0d", a, b, sum, err, $signed(rsum));
      end
      // single-bit fault in the main adder
      inj = W'(1) << $urandom_range(0, W - 1); #1;
      checks++;
      if (!err) begin failures++; if (failures < 10) $display("FAIL undetected inj=%h", inj); end
      else n_det++;
      // corrupted check residue of an operand
      inj = '0; ra = (H+1)'(drs_res(a + W'($urandom_range(1, 14)))); #1;
      checks++;
      if (!err) begin failures++; if (failures < 10) $display("FAIL undetected residue error"); end
    end
    checks++;
    if (n_cout == 0) failures++;
    $display("carry-outs %0d, detected injected faults %0d", n_cout, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
