// drs_to_sru: DRS pseudoresidue -> ordinary residue.
//
// Maps X in [-m, m), (h+1)-bit two's complement, to x = <X>_m in [0, m),
// h bits. The circuit is a single h-bit adder: one input is X[h-1:0], the
// other is X[h] AND m (the sign bit fanned out to the 1-positions of m), so m
// is added exactly when X is negative; the carry out of bit h-1 is dropped.
// This is the conversion of the paper's eq. (2) as described; m is an input so
// the unit can be shared by several moduli of the same width.
//
// Interface: x_drs (H+1 bits, signed), m (H bits, 2^(H-1) < m < 2^H),
// x_sru (H bits). Purely combinational.
module drs_to_sru #(
  parameter int unsigned H = 8   // residue width h
) (
  input  logic [H:0]   x_drs,
  input  logic [H-1:0] m,
  output logic [H-1:0] x_sru
);
  always_comb x_sru = x_drs[H-1:0] + (m & {H{x_drs[H]}});
endmodule
