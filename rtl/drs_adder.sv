// drs_adder: DRS modular pseudoresidue adder/subtractor.
//
// Adds (or subtracts) two DRS pseudoresidues X, Y in [-m, m) and returns
// S = X +/- Y (mod m) in [-m, m) in a single pass. X + Y can leave [-m, m) only
// when the operands have like signs, so a correction K in {0, m, -m} chosen
// from the two sign bits alone is added: -m when both are non-negative, +m
// when both are negative, 0 otherwise. X, Y and K are merged by an
// (h+1)-bit carry-save adder and the two vectors are summed by an (h+1)-bit
// binary adder; carries out of bit h are discarded.
//
// The correction bits are K_i = m_i (Xh Yh) | ~m_i ~(Xh | Yh), the multiplexer
// form the paper gives for its adder: for two non-negative operands this is
// ~m = -m - 1, and the missing +1 enters as the carry-in of the final adder.
// For subtraction Y is bitwise complemented and the +1 of the two's complement
// is inserted in the free LSB of the CSA carry vector, as the paper suggests;
// the sign of ~Y is used for the correction, which is also correct when Y = 0
// or Y = -m. Where these two +1s go is this design's choice.
//
// Interface: x, y (H+1 bits, DRS), m (H bits, m < 2^H), sub (1 = X - Y),
// s (H+1 bits, DRS). Combinational.
module drs_adder #(
  parameter int unsigned H = 8
) (
  input  logic [H:0]   x,
  input  logic [H:0]   y,
  input  logic [H-1:0] m,
  input  logic         sub,
  output logic [H:0]   s
);
  logic [H:0] yy, k, me, cs_sum, cs_car, cs_car_sh;
  logic       both_neg, both_pos;

  always_comb begin
    yy       = sub ? ~y : y;
    both_neg = x[H] & yy[H];
    both_pos = ~(x[H] | yy[H]);
    me       = {1'b0, m};
    for (int i = 0; i <= H; i++)
      k[i] = (me[i] & both_neg) | (~me[i] & both_pos);
    // carry-save adder
    cs_sum    = x ^ yy ^ k;
    cs_car    = (x & yy) | (x & k) | (yy & k);
    cs_car_sh = {cs_car[H-1:0], sub};
    // final (h+1)-bit adder
    s = cs_sum + cs_car_sh + (H+1)'(both_pos);
  end
endmodule
