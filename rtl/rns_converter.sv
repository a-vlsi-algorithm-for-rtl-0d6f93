// rns_converter: direct and reverse residue number system converters side
// by side, for n = N_BITS-bit unsigned numbers and the pairwise coprime
// moduli MODULI (product M with 2^n <= M <= 2^(n+1)).
//
//  * fwd_*: binary N -> residues alpha_i = N mod m_i (rns_forward),
//    log2(n) steps after start.
//  * rev_*: residues -> binary N mod M (rns_reverse), log2(NC_REV) steps
//    after start, NC_REV being the number of residue bits rounded up to a
//    power of two.
// The two run independently, each with its own handshake and its own
// serial preload port; the constants to preload are 2^j mod m_i (direct)
// and the Chinese-remainder weights q_ik (reverse), see the two modules.
// In a residue arithmetic unit the direct converter sits at the input and
// the reverse converter at the output.
module rns_converter #(
  parameter int unsigned N_BITS     = rns_pkg::DEF_N_BITS,
  parameter int unsigned S          = rns_pkg::DEF_S,
  parameter int unsigned MODULI [S] = rns_pkg::DEF_MODULI,
  localparam int unsigned WA        = max_width(MODULI),
  localparam int unsigned W_REV     = rns_pkg::bits_for(prod(MODULI)),
  localparam int unsigned NC_REV    = rns_pkg::pow2_ceil(total_bits(MODULI))
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // direct conversion
  input  logic                     fwd_preload_en,
  input  logic [S-1:0][N_BITS-1:0] fwd_preload_bits,
  input  logic                     fwd_start,
  input  logic [N_BITS-1:0]        fwd_n,
  output logic                     fwd_busy,
  output logic                     fwd_done,
  output logic [S-1:0][WA-1:0]     fwd_alpha,
  // reverse conversion
  input  logic                     rev_preload_en,
  input  logic [NC_REV-1:0]        rev_preload_bits,
  input  logic                     rev_start,
  input  logic [S-1:0][WA-1:0]     rev_alpha,
  output logic                     rev_busy,
  output logic                     rev_done,
  output logic [W_REV-1:0]         rev_n
);
  function automatic int unsigned max_width(int unsigned mods [S]);
    int unsigned r = 1;
    foreach (mods[i]) if (rns_pkg::bits_for(64'(mods[i])) > r) r = rns_pkg::bits_for(64'(mods[i]));
    return r;
  endfunction

  function automatic longint unsigned prod(int unsigned mods [S]);
    longint unsigned p = 1;
    foreach (mods[i]) p = p * mods[i];
    return p;
  endfunction

  function automatic int unsigned total_bits(int unsigned mods [S]);
    int unsigned t = 0;
    foreach (mods[i]) t += rns_pkg::bits_for(64'(mods[i]));
    return t;
  endfunction

  rns_forward #(
    .N_BITS(N_BITS),
    .S     (S),
    .MODULI(MODULI)
  ) u_fwd (
    .clk         (clk),
    .rst_n       (rst_n),
    .preload_en  (fwd_preload_en),
    .preload_bits(fwd_preload_bits),
    .start       (fwd_start),
    .n_in        (fwd_n),
    .busy        (fwd_busy),
    .done        (fwd_done),
    .alpha       (fwd_alpha)
  );

  rns_reverse #(
    .N_BITS(N_BITS),
    .S     (S),
    .MODULI(MODULI)
  ) u_rev (
    .clk         (clk),
    .rst_n       (rst_n),
    .preload_en  (rev_preload_en),
    .preload_bits(rev_preload_bits),
    .start       (rev_start),
    .alpha_in    (rev_alpha),
    .busy        (rev_busy),
    .done        (rev_done),
    .n_out       (rev_n)
  );
endmodule
