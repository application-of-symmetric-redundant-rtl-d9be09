// drs_from_unsigned: h-bit unsigned -> DRS pseudoresidue.
//
// An unsigned X in [0, 2^h) is reduced by unconditionally subtracting m,
// giving X - m in [-m, 2^h - m), a subset of [-m, m) whenever m >= 2^(h-1)
// (paper's eq. (4)). The hardware is one (h+1)-bit subtractor.
//
// Interface: x (H bits), m (H bits), y (H+1 bits, DRS). Combinational.
module drs_from_unsigned #(
  parameter int unsigned H = 8
) (
  input  logic [H-1:0] x,
  input  logic [H-1:0] m,
  output logic [H:0]   y
);
  always_comb y = {1'b0, x} - {1'b0, m};
endmodule
