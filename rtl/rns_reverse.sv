// rns_reverse: reverse converter from residues alpha_i (i = 0 .. S-1) to the
// binary number N, 0 <= N < M = product of the moduli.
//
// Bit k of alpha_i stands for the residue vector that is 2^k in position i
// and 0 elsewhere; its binary value is q_ik = (2^k * M_i * inv_i) mod M, with
// M_i = M / m_i and inv_i the inverse of M_i modulo m_i (Chinese remainder
// theorem). Hence N = ( sum over all set residue bits of q_ik ) mod M. This
// is the same computation as the direct conversion, so one rns_tree does it:
// its cells hold the q_ik and the residue bits enable them.
//
// Cell numbering: the bits of alpha_0 come first, bit 0 lowest, then those
// of alpha_1, and so on; K = sum of bits_for(m_i) cells are used and the
// array is padded to NC, the next power of two, with cells that are never
// enabled. The processing elements add modulo M, W = bits_for(M) bits wide.
// The sum of the N_i is only N when it is reduced modulo M, so the
// modulo-M adder of the direct conversion is used here too rather than a
// plain binary adder.
//
// Interface:
//  * preload: preload_bits[c] shifts into cell c, MSB first, W clocks of
//    preload_en while idle.
//  * start with alpha_in (each residue zero-extended to WA bits, values
//    < m_i): n_out is valid when done pulses, log2(NC) cycles after the
//    start edge, and holds until the next start.
module rns_reverse #(
  parameter int unsigned N_BITS      = rns_pkg::DEF_N_BITS,
  parameter int unsigned S           = rns_pkg::DEF_S,
  parameter int unsigned MODULI [S]  = rns_pkg::DEF_MODULI,
  localparam int unsigned WA         = max_width(MODULI),
  localparam int unsigned W          = rns_pkg::bits_for(prod(MODULI)),
  localparam int unsigned NC         = rns_pkg::pow2_ceil(total_bits(MODULI))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 preload_en,
  input  logic [NC-1:0]        preload_bits,
  input  logic                 start,
  input  logic [S-1:0][WA-1:0] alpha_in,
  output logic                 busy,
  output logic                 done,
  output logic [W-1:0]         n_out
);
  import rns_pkg::*;

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

  // First cell of residue i.
  function automatic int unsigned offset(int unsigned mods [S], int unsigned i);
    int unsigned t = 0;
    for (int unsigned k = 0; k < i; k++) t += rns_pkg::bits_for(64'(mods[k]));
    return t;
  endfunction

  localparam longint unsigned M     = prod(MODULI);
  localparam int unsigned     K     = total_bits(MODULI);
  localparam int unsigned     STEPS = log2_exact(NC);

  logic                 load_in, cnt_load, z_r, step;
  logic [S-1:0][WA-1:0] a_reg;  // input register of the residues
  logic [NC-1:0]        en;

  rns_ctrl #(.STEPS(STEPS)) u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .load_in (load_in),
    .cnt_load(cnt_load),
    .z_r     (z_r),
    .step    (step),
    .busy    (busy),
    .done    (done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       a_reg <= '0;
    else if (load_in) a_reg <= alpha_in;
  end

  // Residue bits to cell enables; padding cells stay disabled.
  always_comb begin
    en = '0;
    for (int unsigned i = 0; i < S; i++)
      for (int unsigned k = 0; k < bits_for(64'(MODULI[i])); k++)
        en[offset(MODULI, i) + k] = a_reg[i][k];
  end

  rns_tree #(
    .NC (NC),
    .W  (W),
    .MOD(M)
  ) u_tree (
    .clk       (clk),
    .rst_n     (rst_n),
    .preload_en(preload_en),
    .pl_bits   (preload_bits),
    .en        (en),
    .z_r       (z_r),
    .step      (step),
    .cnt_load  (cnt_load),
    .result    (n_out)
  );

  initial begin
    assert (M >= (64'd1 << N_BITS))
      else $error("rns_reverse: product of the moduli must cover 2^N_BITS");
    assert (K <= NC);
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !preload_en)
    else $error("rns_reverse: preload during a conversion");
endmodule
