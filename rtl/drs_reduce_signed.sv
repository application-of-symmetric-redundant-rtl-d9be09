// drs_reduce_signed: (h+1)-bit two's complement -> DRS pseudoresidue.
//
// Any X in [-2^h, 2^h) is brought into [-m, m) with one (h+1)-bit adder: m is
// added when X is negative and subtracted (2^(h+1) - m added) when X is
// non-negative. The second adder input is m XORed with the inverted sign bit
// (selective complement) and the carry-in is the inverted sign bit, as in the
// paper's eq. (3). Valid for 2^(h-1) <= m < 2^h.
//
// Interface: x (H+1 bits, signed), m (H bits), y (H+1 bits, DRS).
// Combinational.
module drs_reduce_signed #(
  parameter int unsigned H = 8
) (
  input  logic [H:0]   x,
  input  logic [H-1:0] m,
  output logic [H:0]   y
);
  logic pos;
  always_comb begin
    pos = ~x[H];
    y   = x + ({1'b0, m} ^ {(H+1){pos}}) + (H+1)'(pos);
  end
endmodule
