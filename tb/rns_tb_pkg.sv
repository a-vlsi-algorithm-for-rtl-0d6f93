// rns_tb_pkg: reference arithmetic for the converter testbenches, computed
// independently of the RTL: powers of two modulo m, modular inverses, the
// Chinese-remainder weights of the residue bits and a behavioural model of
// the pairwise modular reduction tree.
package rns_tb_pkg;

  function automatic longint unsigned pow2mod(int unsigned j, longint unsigned m);
    longint unsigned r = 1 % m;
    for (int unsigned k = 0; k < j; k++) r = (2 * r) % m;
    return r;
  endfunction

  // Inverse of a modulo m by exhaustive search (m is small).
  function automatic longint unsigned modinv(longint unsigned a, longint unsigned m);
    for (longint unsigned x = 1; x < m; x++)
      if ((a * x) % m == 1) return x;
    return 0;
  endfunction

  // (a * b) mod m by shift and add, safe for m up to 2^62.
  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b,
                                             longint unsigned m);
    longint unsigned r = 0;
    a = a % m;
    for (int k = 63; k >= 0; k--) begin
      r = (2 * r) % m;
      if (b[k]) r = (r + a) % m;
    end
    return r;
  endfunction

  // Weight of bit k of residue i: (2^k * M_i * inv(M_i mod m_i)) mod M.
  function automatic longint unsigned crt_weight(longint unsigned mi, longint unsigned big_m,
                                                 int unsigned k);
    longint unsigned mm  = big_m / mi;
    longint unsigned inv = modinv(mm % mi, mi);
    return mulmod(mulmod(pow2mod(k, big_m), mm, big_m), inv, big_m);
  endfunction

  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b = 1;
    while ((64'd1 << b) < v) b++;
    return b;
  endfunction

  // Pairwise modular reduction of vals[0 .. n-1] (n a power of two), as
  // the tree does it; corr counts the additions that needed the
  // subtraction of the modulus.
  function automatic longint unsigned tree_sum(longint unsigned vals [], longint unsigned m,
                                               ref int unsigned corr);
    longint unsigned v [] = vals;
    int unsigned     n    = v.size();
    while (n > 1) begin
      for (int unsigned i = 0; i < n / 2; i++) begin
        longint unsigned s = v[2*i] + v[2*i+1];
        if (s >= m) begin
          s = s - m;
          corr++;
        end
        v[i] = s;
      end
      n = n / 2;
    end
    return v[0];
  endfunction

endpackage
