// drs_pkg: constants and elaboration-time helpers shared by the DRS
// (double-range signed) residue arithmetic units.
//
// A DRS pseudoresidue of a modulus m with 2^(h-1) < m < 2^h is an (h+1)-bit
// two's-complement number in [-m, m). Every residue class mod m has two
// representatives, <x>_m and <x>_m - m, which is the one bit of redundancy that
// lets the reduction and correction steps look only at sign bits.
//
// The functions here are evaluated only at elaboration (table contents,
// multiplicative inverses); they do not become hardware.
package drs_pkg;

  // Mathematical (always non-negative) remainder of a by m.
  function automatic longint posmod(longint a, longint m);
    longint r;
    r = a % m;
    if (r < 0) r = r + m;
    return r;
  endfunction

  // Multiplicative inverse of a modulo m (m > 1, gcd(a,m) = 1), by search.
  // Moduli are small, so a linear search is cheap at elaboration time.
  function automatic longint modinv(longint a, longint m);
    longint am;
    am = posmod(a, m);
    for (longint i = 1; i < m; i++)
      if (posmod(am * i, m) == 1) return i;
    return 0;
  endfunction

endpackage
