// sensor_pkg: constants and helper functions shared by the on-line sensing
// design.
//
// The sensor counts ring-oscillator edges in a residue number system (RNS):
// three one-hot rings of lengths 49, 17 and 16, which are pairwise coprime, so
// the counting period is 49 * 17 * 16 = 13,328 and one sensor word is
// 49 + 17 + 16 = 82 bits. These numbers are those of the published sensor.
// The functions below compute, at elaboration time, the weights of the
// Chinese remainder theorem, count = sum(r_i * (M/m_i) * v_i) mod M, where
// v_i is the inverse of M/m_i modulo m_i. Computing them from the moduli
// means that other coprime moduli need no hand-made table.
`timescale 1ns/1ps
package sensor_pkg;

  // Ring lengths (moduli) of the RNS ring counter.
  localparam int unsigned RNS_M1 = 49;
  localparam int unsigned RNS_M2 = 17;
  localparam int unsigned RNS_M3 = 16;

  // Sensor array geometry: a 16 x 7 hexagonal grid, read out over one chain.
  localparam int unsigned ARRAY_ROWS = 16;
  localparam int unsigned ARRAY_COLS = 7;

  // Reference pulse: 40 us at the 100 MHz system clock.
  localparam int unsigned MEASURE_CYCLES = 4000;

  // Greatest common divisor (Euclid).
  function automatic int unsigned gcd(int unsigned a, int unsigned b);
    int unsigned t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Inverse of a modulo m, found by search; 0 if none exists (or m == 1).
  function automatic int unsigned mod_inverse(int unsigned a, int unsigned m);
    for (int unsigned v = 1; v < m; v++) begin
      if (((a % m) * v) % m == 1) return v;
    end
    return 0;
  endfunction

  // CRT weight of the residue modulo mi, for period mtotal: (M/mi) * vi mod M.
  function automatic int unsigned crt_weight(int unsigned mi, int unsigned mtotal);
    int unsigned q;
    q = mtotal / mi;
    return (q * mod_inverse(q, mi)) % mtotal;
  endfunction

  // Number of bits needed to hold the values 0 .. n-1 (at least 1).
  function automatic int unsigned bits_for(int unsigned n);
    int unsigned b;
    b = 1;
    while ((1 << b) < n) b++;
    return b;
  endfunction

endpackage
