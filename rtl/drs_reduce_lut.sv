// drs_reduce_lut: (2h+1)-bit two's complement -> DRS pseudoresidue by table.
//
// The input X (for example the product of two DRS pseudoresidues) is split
// into an upper part X[2h:h-1] of h+2 bits, read as a signed number, and a
// lower part X[h-2:0] of h-1 bits. The upper part addresses a 2^(h+2) x h
// table holding x_hi = m - (2^(h-1) * X[2h:h-1] mod m), a value in [1, m].
// The result is X[h-2:0] - x_hi, which lies in [-m, 2^(h-1) - 1), inside
// [-m, m), and is congruent to X mod m. This is the table scheme the paper
// recommends for small h. The table is built for a fixed modulus, so M is a
// parameter here; its contents are computed at elaboration from the formula.
//
// Interface: x (2H+1 bits, signed), y (H+1 bits, DRS mod M). Combinational.
module drs_reduce_lut #(
  parameter int unsigned H = 8,
  parameter int unsigned M = 251   // 2^(H-1) < M < 2^H
) (
  input  logic [2*H:0] x,
  output logic [H:0]   y
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

  logic [H-1:0] x_hi;
  always_comb begin
    x_hi = ROM[x[2*H:H-1]];
    y    = {2'b00, x[H-2:0]} - {1'b0, x_hi};
  end
endmodule
