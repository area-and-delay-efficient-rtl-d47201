// rns_pkg: constants and elaboration-time helpers shared by the RNS FIR filter.
//
// The filter works in a residue number system with the three-moduli set
// {2^n - 1, 2^n, 2^n + 1}. With n = 3 this is {7, 8, 9}, the set the design
// is built around; n is a parameter of every block that needs it.
// The functions below give a modulus, the dynamic range M, the residue width
// and the Chinese-remainder weights used by the reverse converter. They are
// evaluated only at elaboration time, so they cost no hardware.
package rns_pkg;

  // Number of residue channels (fixed by the three-moduli set).
  localparam int unsigned NUM_CH = 3;

  // Modulus of channel ch (0, 1, 2) for the set {2^n-1, 2^n, 2^n+1}.
  function automatic longint unsigned modulus(input int unsigned n, input int unsigned ch);
    case (ch)
      0:       return (64'd1 << n) - 1;
      1:       return (64'd1 << n);
      default: return (64'd1 << n) + 1;
    endcase
  endfunction

  // Dynamic range M = m1 * m2 * m3.
  // 64-bit, so that n up to 20 can be elaborated.
  function automatic longint unsigned range_m(input int unsigned n);
    return modulus(n, 0) * modulus(n, 1) * modulus(n, 2);
  endfunction

  // Width of every residue: n + 1 bits, enough for the largest channel, 2^n+1.
  function automatic int unsigned res_width(input int unsigned n);
    return n + 1;
  endfunction

  // Chinese-remainder weight of channel ch: (M_i * K_i) mod M, where
  // M_i = M / m_i and K_i is the inverse of M_i modulo m_i.
  function automatic longint unsigned crt_weight(input int unsigned n, input int unsigned ch);
    longint unsigned m, mi, big_m, ki;
    m     = modulus(n, ch);
    big_m = range_m(n);
    mi    = big_m / m;
    ki    = 0;
    for (longint unsigned k = 1; k < m; k++) begin
      if (((mi % m) * k) % m == 1 && ki == 0) ki = k;
    end
    return (mi * ki) % big_m;
  endfunction

endpackage
