// bsd_correct: range correction of a BSD-encoded pseudoresidue.
//
// The input is a BSD number (P, N), value P - N, of H+2 digits whose value
// lies in (-2^(H+1), 2^(H+1)). Only its four most significant digits are
// looked at: they give an estimate e * 2^(H-2) of the value, off by less than
// 2^(H-2). A small table, computed from the modulus at elaboration, maps e to
// k = round(e * 2^(H-2) / M), and the constant -k*M is added with a
// carry-free bsd_adder. The result is congruent to the input and lies in
// (-M/2 - 2^(H-2), M/2 + 2^(H-2)), inside (-M, M) because 2^(H-2) < M/2.
//
// The paper describes this correction as adding a constant chosen only by
// the MSBs of the positive and negative components; the use of four digits
// and the rounding table are this design's. Requires 2^(H-1) < M < 2^H.
//
// Interface: p_in, n_in, p_out, n_out (H+2 bits), corr (a non-zero constant
// was added). Combinational.
module bsd_correct #(
  parameter int unsigned H = 8,
  parameter int unsigned M = 251
) (
  input  logic [H+1:0] p_in,
  input  logic [H+1:0] n_in,
  output logic [H+1:0] p_out,
  output logic [H+1:0] n_out,
  output logic         corr
);
  localparam int unsigned W = H + 2;
  typedef logic signed [3:0] k_t;   // k in [-4, 4]
  typedef k_t ktab_t [32];

  // k for every 5-bit signed estimate e, clamped to the reachable [-4, 4]
  function automatic ktab_t build_ktab();
    ktab_t  t;
    longint e, num, k;
    for (int a = 0; a < 32; a++) begin
      e   = (a >= 16) ? longint'(a) - 32 : longint'(a);
      num = e * (longint'(1) << (H - 2));
      k   = (num >= 0) ? (2 * num + longint'(M)) / (2 * longint'(M)) : -((-2 * num + longint'(M)) / (2 * longint'(M)));
      if (k > 4)  k = 4;
      if (k < -4) k = -4;
      t[a] = k_t'(k);
    end
    return t;
  endfunction
  localparam ktab_t KTAB = build_ktab();

  logic signed [4:0] e;
  k_t                k;
  logic [2:0]        k_mag;
  logic [W-1:0]      c_mag, c_p, c_n;

  always_comb begin
    e     = $signed({1'b0, p_in[H+1:H-2]}) - $signed({1'b0, n_in[H+1:H-2]});
    k     = KTAB[unsigned'(e)];
    k_mag = k[3] ? 3'(-k) : 3'(k);
    c_mag = W'(k_mag * M);
    // adding -k*M: a positive k goes to the negative side
    c_p   = k[3] ? c_mag : '0;
    c_n   = k[3] ? '0 : c_mag;
    corr  = (k != 0);
  end

  bsd_adder #(.W(W), .WO(W), .J(H - 1)) u_add (
    .a_p(p_in), .a_n(n_in), .b_p(c_p), .b_n(c_n), .s_p(p_out), .s_n(n_out)
  );
endmodule
