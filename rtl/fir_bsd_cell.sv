// fir_bsd_cell: one tap of the FIR residue channel with BSD-encoded
// intermediate pseudoresidues.
//
// The running total arrives as a BSD number (P, N) of H+2 digits, value
// P - N, straight from the previous cell's register. In the early part of
// the cell bsd_correct adds a constant chosen by the total's top digits,
// which brings the value into (-m, m); this runs in parallel with the
// multiplication, so its delay is hidden. The tap multiplies the DRS sample
// by the DRS coefficient; the (2h+1)-bit product is split into its low h-1
// bits, taken as the positive part Y+ in [0, 2^(h-1)), and its upper h+2
// bits, which address a table giving the negative part
// Y- = m - (2^(h-1) * upper mod m) in [1, m]. So the product becomes the BSD
// pseudoresidue Y+ - Y- without any carry-propagate reduction. A carry-free
// bsd_adder adds it to the corrected total; the sum lies in
// (-2m, m + 2^(h-1)) and is registered as H+2 digits.
//
// The product split, the table, the two BSD adders and the MSB-driven
// correction follow the paper's Fig. 4 description; the digit count, the
// estimate from four digits and the top-digit recoding are this design's.
//
// Interface: en, x and c (H+1 bits, DRS mod M), p_in/n_in (H+2 bits, from
// the previous cell), p_out/n_out (H+2 bits, registered), corr (the
// correction added a non-zero constant this cycle). Timing: one register
// stage.
module fir_bsd_cell #(
  parameter int unsigned H = 8,
  parameter int unsigned M = 251
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [H:0]   x,
  input  logic [H:0]   c,
  input  logic [H+1:0] p_in,
  input  logic [H+1:0] n_in,
  output logic [H+1:0] p_out,
  output logic [H+1:0] n_out,
  output logic         corr
);
  import drs_pkg::*;

  localparam int unsigned DEPTH = 2 ** (H + 2);
  typedef logic [H-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t   t;
    longint sv;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      sv   = (a >= DEPTH / 2) ? longint'(a) - longint'(DEPTH) : longint'(a);
      t[a] = H'(longint'(M) - posmod(sv * (longint'(1) << (H - 1)), longint'(M)));
    end
    return t;
  endfunction
  localparam rom_t ROM = build_rom();

  logic [H+1:0]        p_c, n_c, y_pos, y_neg, p_s, n_s;
  logic signed [2*H:0] prod;

  bsd_correct #(.H(H), .M(M)) u_corr (
    .p_in(p_in), .n_in(n_in), .p_out(p_c), .n_out(n_c), .corr(corr)
  );

  always_comb begin
    prod  = (2*H+1)'($signed(x) * $signed(c));
    y_pos = (H+2)'(prod[H-2:0]);
    y_neg = (H+2)'(ROM[prod[2*H:H-1]]);
  end

  bsd_adder #(.W(H + 2), .WO(H + 2), .J(H - 1)) u_add (
    .a_p(p_c), .a_n(n_c), .b_p(y_pos), .b_n(y_neg), .s_p(p_s), .s_n(n_s)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_out <= '0;
      n_out <= '0;
    end else if (en) begin
      p_out <= p_s;
      n_out <= n_s;
    end
  end
endmodule
