// fir_channel: one residue channel of an RNS FIR filter built from
// drs_mac_cell taps.
//
// An RNS FIR filter converts its input to residues, filters every residue
// channel independently and converts back. This module is the computational
// part of one channel: a linear array of TAPS multiply-accumulate cells, one
// per tap, in transposed form. Every cell sees the current input sample
// x[n]; cell j adds c_j * x[n] to the running total passed from cell j+1 and
// registers it, so cell 0 holds y[n] = sum_j c_j x[n-j] (mod m) as a
// (2h+1)-bit wide pseudoresidue. drs_reduce_lut converts it to an (h+1)-bit
// DRS pseudoresidue at the output.
//
// The paper specifies the array of cells and the final conversion; the
// transposed arrangement, the enable and the coefficient ports are choices
// of this design.
//
// Interface: in_valid with x_in (H+1 bits, DRS mod M), coef[TAPS] (H+1 bits,
// DRS, held constant while filtering), y_out (H+1 bits, DRS), y_valid,
// ovf_count (number of cells applying the 2^h*m correction this cycle).
// Timing: y_out for the sample taken with in_valid is valid (y_valid) on the
// next clock edge.
module fir_channel #(
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
  output logic [$clog2(TAPS+1)-1:0] ovf_count
);
  localparam logic [H-1:0] MOD = H'(M);

  logic [2*H:0] acc [TAPS+1];
  logic         ovf [TAPS];

  assign acc[TAPS] = '0;

  for (genvar j = 0; j < TAPS; j++) begin : g_tap
    drs_mac_cell #(.H(H)) u_cell (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (in_valid),
      .x      (x_in),
      .y      (coef[j]),
      .m      (MOD),
      .acc_in (acc[j+1]),
      .acc_out(acc[j]),
      .ovf    (ovf[j])
    );
  end

  always_comb begin
    ovf_count = '0;
    for (int j = 0; j < TAPS; j++)
      if (in_valid && ovf[j]) ovf_count = ovf_count + 1'b1;
  end

  drs_reduce_lut #(.H(H), .M(M)) u_conv (.x(acc[0]), .y(y_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= in_valid;
  end
endmodule
