// rns_pkg: constants and elaboration-time helpers shared by the residue
// number system (RNS) converters.
//
// The converters turn an unsigned n-bit binary number N into its residues
// alpha_i = N mod m_i for s pairwise coprime moduli, and back. Both directions
// use the same structure: a column of preloaded cells whose enabled contents
// are summed modulo a constant by a binary tree of processing elements that
// share one partitioned data bus.
//
// The default configuration (n = 16, moduli 15, 16, 17, 19, M = 77520) is a
// choice of this implementation: it satisfies 2^n <= M <= 2^(n+1) with moduli
// of similar size, as the method requires, but no specific sizes are fixed by
// the method itself.
package rns_pkg;

  localparam int unsigned DEF_N_BITS = 16;
  localparam int unsigned DEF_S      = 4;
  localparam int unsigned DEF_MODULI [DEF_S] = '{15, 16, 17, 19};

  // Number of bits needed to hold the values 0 .. v-1 (at least 1).
  function automatic int unsigned bits_for(longint unsigned v);
    int unsigned b = 1;
    while ((64'd1 << b) < v) b++;
    return b;
  endfunction

  // 2-adic valuation of v (v > 0): number of trailing zero bits.
  function automatic int unsigned v2(int unsigned v);
    int unsigned k = 0;
    while (v != 0 && v[0] == 1'b0) begin
      v = v >> 1;
      k++;
    end
    return k;
  endfunction

  // Wired preset of the partitioning counter of row x (0-based). The row's
  // bus gate closes, and its accumulator drives the bus, at step
  // v2(x+1) + 2; the counter reaches zero exactly then.
  function automatic int unsigned row_preset(int unsigned x);
    return v2(x + 1) + 1;
  endfunction

  // log2 of a power of two.
  function automatic int unsigned log2_exact(int unsigned v);
    int unsigned k = 0;
    while ((1 << k) < v) k++;
    return k;
  endfunction

  // Smallest power of two >= v (at least 2).
  function automatic int unsigned pow2_ceil(int unsigned v);
    int unsigned p = 2;
    while (p < v) p = p * 2;
    return p;
  endfunction

endpackage
