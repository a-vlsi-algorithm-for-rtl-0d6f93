// rns_forward: direct converter from an N_BITS-bit unsigned binary number N
// to its residues alpha_i = N mod m_i, i = 0 .. S-1.
//
// Since N = sum of b_j 2^j, alpha_i = ( sum over j with b_j = 1 of
// (2^j mod m_i) ) mod m_i. One rns_tree per modulus, all side by side,
// holds the N_BITS constants 2^j mod m_i in its cells; the bits of N, held
// in one input register shared by all trees, enable the cells; every tree
// sums its enabled cells modulo m_i in log2(N_BITS) steps. All trees run in
// lock step under one rns_ctrl.
//
// Interface:
//  * preload: while preload_en is high, preload_bits[i][j] shifts one bit
//    into cell j of tree i, most significant bit first. Shift WA bits (WA =
//    width of the largest residue) of the zero-extended value 2^j mod m_i;
//    narrower trees keep only their last bits. Preload while idle.
//  * start with n_in: accepted while not busy; alpha is valid when done
//    pulses, log2(N_BITS) cycles after the start edge, and holds until the
//    next start. alpha[i] is zero-extended to WA bits.
// The structure (preloaded powers of two, one array per modulus, shared
// input register) follows the method; the interface is this
// implementation's choice. The moduli must be pairwise coprime.
module rns_forward #(
  parameter int unsigned N_BITS      = rns_pkg::DEF_N_BITS,
  parameter int unsigned S           = rns_pkg::DEF_S,
  parameter int unsigned MODULI [S]  = rns_pkg::DEF_MODULI,
  localparam int unsigned WA         = max_width(MODULI)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     preload_en,
  input  logic [S-1:0][N_BITS-1:0] preload_bits,
  input  logic                     start,
  input  logic [N_BITS-1:0]        n_in,
  output logic                     busy,
  output logic                     done,
  output logic [S-1:0][WA-1:0]     alpha
);
  import rns_pkg::*;

  function automatic int unsigned max_width(int unsigned mods [S]);
    int unsigned r = 1;
    foreach (mods[i]) if (rns_pkg::bits_for(64'(mods[i])) > r) r = rns_pkg::bits_for(64'(mods[i]));
    return r;
  endfunction

  localparam int unsigned STEPS = log2_exact(N_BITS);

  logic              load_in, cnt_load, z_r, step;
  logic [N_BITS-1:0] b_reg;  // the n-bit input register

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
    if (!rst_n)       b_reg <= '0;
    else if (load_in) b_reg <= n_in;
  end

  for (genvar i = 0; i < S; i++) begin : g_mod
    localparam int unsigned WI = bits_for(64'(MODULI[i]));
    logic [WI-1:0] res;

    rns_tree #(
      .NC (N_BITS),
      .W  (WI),
      .MOD(64'(MODULI[i]))
    ) u_tree (
      .clk       (clk),
      .rst_n     (rst_n),
      .preload_en(preload_en),
      .pl_bits   (preload_bits[i]),
      .en        (b_reg),
      .z_r       (z_r),
      .step      (step),
      .cnt_load  (cnt_load),
      .result    (res)
    );

    assign alpha[i] = WA'(res);
  end

  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !preload_en)
    else $error("rns_forward: preload during a conversion");
endmodule
