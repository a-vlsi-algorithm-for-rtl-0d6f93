// tb_rns_converter: end-to-end test of the complete converter at its default
// parameters (16-bit numbers, moduli 15, 16, 17, 19).
//
// Both arrays are preloaded serially (powers of two modulo m_i for the
// direct converter, Chinese-remainder weights for the reverse one). Then
// random numbers N < 2^16 are converted to residues, the residues are fed
// to the reverse converter and the round trip must give N back; numbers
// M > N >= 2^16 are also converted back from their residues. Latencies are
// checked (4 and 5 steps). The testbench counts how often each mechanism
// of the structure is exercised and fails if one never is: serial
// preloading, runs with Z_R (first step on the registers R), rows driving
// the partitioned bus after their counter's zero crossing, modular
// additions that needed the subtraction of the modulus (from its own
// reference model of the pairwise tree), disabled cells (zero bits) and
// back-to-back runs.
module tb_rns_converter;
  import rns_pkg::*;

  localparam int unsigned N  = DEF_N_BITS;
  localparam int unsigned S  = DEF_S;
  localparam int unsigned WA = 5;
  localparam int unsigned WR = 17;
  localparam int unsigned NR = 32;
  localparam longint unsigned M = 77520;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                 fwd_preload_en, fwd_start, fwd_busy, fwd_done;
  logic [S-1:0][N-1:0]  fwd_preload_bits;
  logic [N-1:0]         fwd_n;
  logic [S-1:0][WA-1:0] fwd_alpha;
  logic                 rev_preload_en, rev_start, rev_busy, rev_done;
  logic [NR-1:0]        rev_preload_bits;
  logic [S-1:0][WA-1:0] rev_alpha;
  logic [WR-1:0]        rev_n;

  rns_converter dut (.*);

  // mechanism counters
  int n_preload = 0, n_zr = 0, n_bus_drive = 0, n_corr = 0, n_zero_cells = 0;
  int n_back_to_back = 0;

  always @(posedge clk) begin
    if (dut.u_fwd.z_r) n_zr++;
    if (dut.u_fwd.step && dut.u_fwd.g_mod[0].u_tree.g_row[0].u_row.drive) n_bus_drive++;
    if (dut.u_fwd.step && dut.u_fwd.g_mod[0].u_tree.g_row[3].u_row.drive) n_bus_drive++;
    if (dut.u_rev.step && dut.u_rev.u_tree.g_row[7].u_row.drive) n_bus_drive++;
  end

  longint unsigned q [NR];

  task automatic preload_all();
    int c = 0;
    foreach (q[j]) q[j] = 0;
    for (int i = 0; i < S; i++)
      for (int k = 0; k < rns_tb_pkg::bits_for(DEF_MODULI[i]); k++)
        q[c++] = rns_tb_pkg::crt_weight(DEF_MODULI[i], M, k);
    for (int k = WR - 1; k >= 0; k--) begin
      @(negedge clk);
      rev_preload_en = 1;
      fwd_preload_en = (k < WA);
      for (int j = 0; j < NR; j++) rev_preload_bits[j] = 1'(q[j] >> k);
      for (int i = 0; i < S; i++)
        for (int j = 0; j < N; j++)
          fwd_preload_bits[i][j] = 1'(rns_tb_pkg::pow2mod(j, DEF_MODULI[i]) >> k);
    end
    @(negedge clk);
    fwd_preload_en = 0;
    rev_preload_en = 0;
    n_preload++;
  endtask

  // Waits for done; returns the clock edges seen since the start edge.
  task automatic wait_done(bit rev, output int cyc);
    cyc = 1;
    @(negedge clk);
    while (!(rev ? rev_done : fwd_done) && cyc < 50) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  task automatic to_residues(logic [N-1:0] v, output logic [S-1:0][WA-1:0] a);
    int cyc;
    longint unsigned vals [] = new[N];
    @(negedge clk);
    fwd_n = v; fwd_start = 1;
    wait_done(0, cyc);
    fwd_start = 0;
    checks++;
    if (cyc != 5) begin failures++; $display("forward latency %0d", cyc); end
    for (int i = 0; i < S; i++) begin
      int unsigned corr = 0;
      for (int j = 0; j < N; j++) vals[j] = v[j] ? rns_tb_pkg::pow2mod(j, DEF_MODULI[i]) : 0;
      void'(rns_tb_pkg::tree_sum(vals, DEF_MODULI[i], corr));
      n_corr += corr;
      checks++;
      if (fwd_alpha[i] !== WA'(v % DEF_MODULI[i])) begin
        failures++;
        $display("N=%0d m=%0d: residue %0d", v, DEF_MODULI[i], fwd_alpha[i]);
      end
    end
    for (int j = 0; j < N; j++) if (!v[j]) n_zero_cells++;
    a = fwd_alpha;
  endtask

  task automatic from_residues(logic [S-1:0][WA-1:0] a, longint unsigned expect_n);
    int cyc;
    longint unsigned vals [] = new[NR];
    int unsigned corr = 0;
    int c = 0;
    for (int j = 0; j < NR; j++) vals[j] = 0;
    for (int i = 0; i < S; i++)
      for (int k = 0; k < rns_tb_pkg::bits_for(DEF_MODULI[i]); k++) begin
        vals[c] = a[i][k] ? q[c] : 0;
        c++;
      end
    void'(rns_tb_pkg::tree_sum(vals, M, corr));
    n_corr += corr;
    @(negedge clk);
    rev_alpha = a; rev_start = 1;
    wait_done(1, cyc);
    rev_start = 0;
    checks++;
    if (cyc != 6) begin failures++; $display("reverse latency %0d", cyc); end
    checks++;
    if (rev_n !== WR'(expect_n)) begin
      failures++;
      $display("reverse: got %0d expected %0d", rev_n, expect_n);
    end
  endtask

  initial begin
    logic [S-1:0][WA-1:0] a;
    fwd_preload_en = 0; fwd_start = 0; fwd_n = 0; fwd_preload_bits = '0;
    rev_preload_en = 0; rev_start = 0; rev_alpha = 0; rev_preload_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    preload_all();
    // round trips
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] v;
      v = N'($urandom);
      if (t == 0) v = '0;
      if (t == 1) v = '1;
      to_residues(v, a);
      from_residues(a, v);
    end
    // numbers beyond 2^n, up to M - 1, from their residues
    for (int t = 0; t < 100; t++) begin
      longint unsigned v;
      v = 65536 + ($urandom % (M - 65536));
      for (int i = 0; i < S; i++) a[i] = WA'(v % DEF_MODULI[i]);
      from_residues(a, v);
    end
    // back-to-back: start again in the cycle done is seen
    for (int t = 0; t < 20; t++) begin
      logic [N-1:0] v, nv;
      v  = N'($urandom);
      nv = ~v;
      @(negedge clk);
      fwd_n = v; fwd_start = 1;
      @(negedge clk);
      fwd_start = 0;
      while (!fwd_done) @(negedge clk);
      checks++;
      if (fwd_alpha[2] !== WA'(v % DEF_MODULI[2])) failures++;
      fwd_n = nv; fwd_start = 1;  // accepted in the done cycle
      @(negedge clk);
      fwd_start = 0;
      while (!fwd_done) @(negedge clk);
      checks++;
      if (fwd_alpha[3] !== WA'(nv % DEF_MODULI[3])) failures++;
      n_back_to_back++;
    end
    // a second preload (the arrays can be reloaded between runs)
    preload_all();
    to_residues(N'(12345), a);
    from_residues(a, 12345);

    $display("mechanisms: preload=%0d zr_steps=%0d bus_drives=%0d mod_corrections=%0d zero_cells=%0d back_to_back=%0d",
             n_preload, n_zr, n_bus_drive, n_corr, n_zero_cells, n_back_to_back);
    checks++; if (n_preload == 0)      failures++;
    checks++; if (n_zr == 0)           failures++;
    checks++; if (n_bus_drive == 0)    failures++;
    checks++; if (n_corr == 0)         failures++;
    checks++; if (n_zero_cells == 0)   failures++;
    checks++; if (n_back_to_back == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
