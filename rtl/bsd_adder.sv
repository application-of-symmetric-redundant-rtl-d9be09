// bsd_adder: carry-free adder for binary signed-digit (BSD) numbers.
//
// A BSD number is held as two bit vectors, P and N, and its value is P - N;
// digit i is p_i - n_i, from {-1, 0, 1}. Two such numbers are added in two
// levels of full adders, with no carry chain:
//   level 1, per bit:  a_p + b_p - a_n = 2*c1 - ~s1,  (c1, s1) = FA(a_p, b_p, ~a_n)
//   level 2, per bit:  c1' - ~s1 - b_n = ~s2 - 2*c2,  (c2, s2) = FA(~s1, b_n, ~c1')
// (c1' is c1 moved up one position.) The result's positive vector is ~s2 and
// its negative vector is c2 moved up one position. Every identity is exact,
// so the sum is exact; its delay is two full adders whatever the width.
// Because the negative vector is made of carries, its LSB s_n[0] is always
// 0; the port keeps it so that sums can feed another bsd_adder directly.
//
// The raw sum has one more digit than the inputs. The digits from position J
// upward are then recoded: their value U (a few bits, independent of the
// data width) is written back in positions J..WO-1 as a one-sided binary
// number, positive part if U >= 0, negative part otherwise. The caller
// chooses J and WO so that the value range of its data keeps |U| below
// 2^(WO-J). This keeps the stored width fixed without any long carry.
//
// The two-level BSD addition is the standard carry-free scheme the paper
// refers to; the top-digit recoding is this design's way of bounding width.
//
// Interface: a_p, a_n, b_p, b_n (W bits), s_p, s_n (WO bits). Combinational.
module bsd_adder #(
  parameter int unsigned W  = 10,
  parameter int unsigned WO = 10,
  parameter int unsigned J  = 7
) (
  input  logic [W-1:0]  a_p,
  input  logic [W-1:0]  a_n,
  input  logic [W-1:0]  b_p,
  input  logic [W-1:0]  b_n,
  output logic [WO-1:0] s_p,
  output logic [WO-1:0] s_n
);
  localparam int unsigned X  = W + 1;      // raw sum width
  localparam int unsigned UW = X - J + 1;  // signed width of the top value

  logic [X-1:0]  ap, an, bp, bn, s1, c1, q, s2, c2, rp, rn;
  logic signed [UW-1:0] u, u_mag;

  always_comb begin
    ap = X'(a_p); an = X'(a_n); bp = X'(b_p); bn = X'(b_n);
    // level 1: positive carries, negative sums
    s1 = ap ^ bp ^ ~an;
    c1 = (ap & bp) | (ap & ~an) | (bp & ~an);
    q  = {c1[X-2:0], 1'b0};
    // level 2: positive sums, negative carries
    s2 = ~s1 ^ bn ^ ~q;
    c2 = (~s1 & bn) | (~s1 & ~q) | (bn & ~q);
    rp = ~s2;
    rn = {c2[X-2:0], 1'b0};
    // recode digits J and up into a one-sided binary number
    u     = $signed({1'b0, rp[X-1:J]}) - $signed({1'b0, rn[X-1:J]});
    u_mag = u[UW-1] ? -u : u;
    s_p   = WO'(rp[J-1:0]);
    s_n   = WO'(rn[J-1:0]);
    if (u[UW-1]) s_n[WO-1:J] = (WO-J)'(u_mag);
    else         s_p[WO-1:J] = (WO-J)'(u_mag);
  end
endmodule
