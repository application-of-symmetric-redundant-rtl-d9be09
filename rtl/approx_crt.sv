// approx_crt: approximate CRT decoding and sign detection from DRS
// pseudoresidues.
//
// By the Chinese remainder theorem a number x with residues r_i has the
// normalised magnitude x/M = frac( sum_i <r_i * inv(M/m_i)>_(m_i) / m_i ),
// M = m_0 m_1 ... m_(K-1). Each residue addresses its own table holding its
// contribution <r_i inv(M/m_i)>_(m_i) / m_i truncated to F fraction bits; the
// K table outputs are added modulo 1, i.e. an F-bit adder whose carries out
// of the binary point are dropped. Since the tables are indexed by (h+1)-bit
// pseudoresidues they have 2^(h+1) entries, twice the size needed for
// ordinary residues; both representatives of a class read the same value.
// The MSB of the fraction is an approximate sign for the signed range
// [-M/2, M/2): set means x/M >= 1/2, i.e. negative. Each table entry is
// truncated, so the result is below the exact fraction by less than K*2^-F.
//
// The table-and-modulo-1-adder scheme follows the paper. F, the direct
// (ungrouped) table addressing and the default moduli are choices of this
// design; the bit-grouping that trims the table overhead is not used.
//
// Interface: res[K] (H+1 bits, DRS mod MOD[i]), frac (F bits, x/M),
// neg (approximate sign). Combinational.
module approx_crt #(
  parameter int unsigned H = 3,
  parameter int unsigned K = 4,
  parameter int unsigned MOD [K] = '{2, 3, 5, 7},
  parameter int unsigned F = 8
) (
  input  logic [H:0]   res [K],
  output logic [F-1:0] frac,
  output logic         neg
);
  import drs_pkg::*;

  localparam int unsigned N = 2 ** (H + 1);   // entries per table
  typedef logic [F-1:0] rom_t [K*N];

  function automatic rom_t build_rom();
    rom_t   t;
    longint bigm, mi, ci, rv, q;
    bigm = 1;
    for (int i = 0; i < K; i++) bigm = bigm * longint'(MOD[i]);
    for (int i = 0; i < K; i++) begin
      mi = longint'(MOD[i]);
      ci = modinv((bigm / mi) % mi, mi);
      for (int a = 0; a < int'(N); a++) begin
        rv = (a >= int'(N) / 2) ? longint'(a) - longint'(N) : longint'(a);
        q  = posmod(rv * ci, mi);
        t[i*int'(N)+a] = F'((q << F) / mi);
      end
    end
    return t;
  endfunction
  localparam rom_t ROM = build_rom();

  always_comb begin
    frac = '0;
    for (int i = 0; i < K; i++)
      frac = frac + ROM[i*int'(N) + int'(res[i])];
    neg = frac[F-1];
  end
endmodule
