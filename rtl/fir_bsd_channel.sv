// fir_bsd_channel: FIR residue channel with BSD-encoded intermediate
// pseudoresidues (the faster alternative to fir_channel).
//
// Inputs and outputs are ordinary (h+1)-bit DRS pseudoresidues, but inside
// the linear array every running total is a binary signed-digit number
// (P, N) of h+2 digits, value P - N, similar to carry-save form. Each tap
// (fir_bsd_cell) turns its product into such a number by splitting the bits
// and one table lookup, corrects the incoming total with a constant chosen
// by its top digits, and adds with a carry-free BSD adder, so no cell holds
// a carry-propagate adder. The array is in transposed form: every cell sees
// the current sample, totals move toward cell 0. The final conversion is
// the same correction (result in (-m, m)) followed by recoding to two's
// complement with one subtraction, P - N.
//
// Structure after the paper's Fig. 4 description; the digit count and the
// correction table are this design's choices (see bsd_correct).
//
// Interface: in_valid, x_in (H+1 bits, DRS mod M), coef[TAPS] (H+1 bits,
// DRS), y_out (H+1 bits, DRS), y_valid, corr_count (cells whose incoming
// total got a non-zero correction this cycle). Timing: output one clock
// after input.
module fir_bsd_channel #(
  parameter int unsigned H    = 8,
  parameter int unsigned M    = 251,
  parameter int unsigned TAPS = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [H:0]   x_in,
  input  logic [H:0]   coef [TAPS],
  output logic [H:0]   y_out,
  output logic         y_valid,
  output logic [$clog2(TAPS+1)-1:0] corr_count
);
  logic [H+1:0] p [TAPS+1];
  logic [H+1:0] n [TAPS+1];
  logic       corr [TAPS];

  assign p[TAPS] = '0;
  assign n[TAPS] = '0;

  for (genvar j = 0; j < TAPS; j++) begin : g_tap
    fir_bsd_cell #(.H(H), .M(M)) u_cell (
      .clk(clk), .rst_n(rst_n), .en(in_valid), .x(x_in), .c(coef[j]),
      .p_in(p[j+1]), .n_in(n[j+1]), .p_out(p[j]), .n_out(n[j]), .corr(corr[j])
    );
  end

  always_comb begin
    corr_count = '0;
    for (int j = 0; j < TAPS; j++)
      if (in_valid && corr[j]) corr_count = corr_count + 1'b1;
  end

  // final conversion: correction, then recoding to two's complement
  logic [H+1:0] p_f, n_f, diff;
  logic         corr_f;
  bsd_correct #(.H(H), .M(M)) u_corr (
    .p_in(p[0]), .n_in(n[0]), .p_out(p_f), .n_out(n_f), .corr(corr_f)
  );
  assign diff  = p_f - n_f;
  assign y_out = diff[H:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= in_valid;
  end
endmodule
