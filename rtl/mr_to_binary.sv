// mr_to_binary: mixed-radix to binary conversion, the last step of RNS to
// binary conversion.
//
// With ordinary mixed-radix digits e_i in [0, m_i) for moduli
// m_0 < m_1 < ... < m_(K-1), the number is
//   u = e_0 + e_1*m_0 + e_2*m_0*m_1 + ... ,
// evaluated here by Horner's rule from the top digit down:
//   acc = e_(K-1);  acc = acc*m_i + e_i  for i = K-2 .. 0.
// The moduli are parameters, so each step is a multiplication by a small
// constant (a few shifted adds) and one addition; there is no modular
// reduction. The result is an unsigned number in [0, M), M = m_0...m_(K-1).
//
// The paper obtains RNS-to-binary conversion by first converting to mixed
// radix; this closing sum is the standard one and its form is this design's.
// The digits come from rrns_checker, which turns the redundant DRS digits
// into ordinary ones.
//
// Interface: digits[K] (H bits each, ordinary), value (BW bits; the default
// H*K is always wide enough, and the bits above log2(M) are then simply 0).
// Combinational.
module mr_to_binary #(
  parameter int unsigned H = 4,
  parameter int unsigned K = 4,
  parameter int unsigned MOD [K] = '{2, 3, 5, 7},   // ascending
  parameter int unsigned BW = H * K                 // every m_i < 2^H, so M <= 2^BW
) (
  input  logic [H-1:0]  digits [K],
  output logic [BW-1:0] value
);
  always_comb begin
    value = BW'(digits[K-1]);
    for (int i = int'(K) - 2; i >= 0; i--)
      value = BW'(value * BW'(MOD[i])) + BW'(digits[i]);
  end
endmodule
