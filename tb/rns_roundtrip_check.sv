// rns_roundtrip_check: testbench helper that builds one rns_converter for a
// given n and moduli list, preloads both arrays, and checks round trips
// N -> residues -> N for random N < 2^n as well as the reverse conversion
// of random N < M. Latencies are checked against log2(n) and log2 of the
// reverse cell count rounded up to a power of two. It reports its counts on
// its outputs and raises finished at the end.
module rns_roundtrip_check #(
  parameter int unsigned N_BITS     = 16,
  parameter int unsigned S          = 4,
  parameter int unsigned MODULI [S] = '{15, 16, 17, 19},
  parameter int unsigned TRIALS     = 100
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  // Widths and sizes, worked out here from the moduli.
  function automatic int unsigned max_w();
    int unsigned r = 1;
    foreach (MODULI[i]) if (rns_tb_pkg::bits_for(MODULI[i]) > r) r = rns_tb_pkg::bits_for(MODULI[i]);
    return r;
  endfunction
  function automatic longint unsigned prod();
    longint unsigned p = 1;
    foreach (MODULI[i]) p = p * MODULI[i];
    return p;
  endfunction
  function automatic int unsigned cells();
    int unsigned t = 0, c = 2;
    foreach (MODULI[i]) t += rns_tb_pkg::bits_for(MODULI[i]);
    while (c < t) c = c * 2;
    return c;
  endfunction
  function automatic int unsigned lg(int unsigned v);
    int unsigned k = 0;
    while ((1 << k) < v) k++;
    return k;
  endfunction

  localparam int unsigned     WA = max_w();
  localparam longint unsigned M  = prod();
  localparam int unsigned     WR = rns_tb_pkg::bits_for(M);
  localparam int unsigned     NR = cells();

  logic                     fwd_preload_en, fwd_start, fwd_busy, fwd_done;
  logic [S-1:0][N_BITS-1:0] fwd_preload_bits;
  logic [N_BITS-1:0]        fwd_n;
  logic [S-1:0][WA-1:0]     fwd_alpha;
  logic                     rev_preload_en, rev_start, rev_busy, rev_done;
  logic [NR-1:0]            rev_preload_bits;
  logic [S-1:0][WA-1:0]     rev_alpha;
  logic [WR-1:0]            rev_n;

  rns_converter #(.N_BITS(N_BITS), .S(S), .MODULI(MODULI)) dut (.*);

  longint unsigned q [NR];

  task automatic run(bit rev, int exp_edges);
    int cyc = 1;
    @(negedge clk);
    if (rev) rev_start = 0; else fwd_start = 0;
    while (!(rev ? rev_done : fwd_done) && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != exp_edges) begin
      failures++;
      $display("n=%0d s=%0d: %s latency %0d, expected %0d", N_BITS, S,
               rev ? "reverse" : "direct", cyc, exp_edges);
    end
  endtask

  initial begin
    int c = 0;
    finished = 0; checks = 0; failures = 0;
    fwd_preload_en = 0; fwd_start = 0; fwd_n = 0; fwd_preload_bits = '0;
    rev_preload_en = 0; rev_start = 0; rev_alpha = '0; rev_preload_bits = '0;
    foreach (q[j]) q[j] = 0;
    foreach (MODULI[i])
      for (int k = 0; k < rns_tb_pkg::bits_for(MODULI[i]); k++)
        q[c++] = rns_tb_pkg::crt_weight(MODULI[i], M, k);
    @(posedge rst_n);
    for (int k = WR - 1; k >= 0; k--) begin
      @(negedge clk);
      rev_preload_en = 1;
      fwd_preload_en = (k < WA);
      for (int j = 0; j < NR; j++) rev_preload_bits[j] = 1'(q[j] >> k);
      for (int i = 0; i < S; i++)
        for (int j = 0; j < N_BITS; j++)
          fwd_preload_bits[i][j] = 1'(rns_tb_pkg::pow2mod(j, MODULI[i]) >> k);
    end
    @(negedge clk);
    fwd_preload_en = 0; rev_preload_en = 0;
    for (int t = 0; t < TRIALS; t++) begin
      logic [N_BITS-1:0] v;
      longint unsigned   w;
      v = N_BITS'({$urandom, $urandom});
      if (t == 0) v = '0;
      if (t == 1) v = '1;
      // direct
      @(negedge clk);
      fwd_n = v; fwd_start = 1;
      run(0, lg(N_BITS) + 1);
      for (int i = 0; i < S; i++) begin
        checks++;
        if (fwd_alpha[i] !== WA'(longint'(v) % MODULI[i])) begin
          failures++;
          $display("n=%0d: N=%0d m=%0d residue %0d", N_BITS, v, MODULI[i], fwd_alpha[i]);
        end
      end
      // back through the reverse converter
      @(negedge clk);
      rev_alpha = fwd_alpha; rev_start = 1;
      run(1, lg(NR) + 1);
      checks++;
      if (rev_n !== WR'(v)) begin
        failures++;
        $display("n=%0d: round trip of %0d gave %0d", N_BITS, v, rev_n);
      end
      // reverse conversion of any N < M
      w = {$urandom, $urandom} % M;
      if (t == 2) w = M - 1;
      @(negedge clk);
      for (int i = 0; i < S; i++) rev_alpha[i] = WA'(w % MODULI[i]);
      rev_start = 1;
      run(1, lg(NR) + 1);
      checks++;
      if (rev_n !== WR'(w)) begin
        failures++;
        $display("n=%0d: reverse of %0d gave %0d", N_BITS, w, rev_n);
      end
    end
    finished = 1;
  end
endmodule
