// tb_rns_reverse: reverse converter at its default size (moduli 15, 16, 17,
// 19, M = 77520, 18 residue bits in a 32-cell array). Preloads the
// Chinese-remainder weights of the residue bits, converts the residues of
// random and corner-case numbers below M and compares the result with the
// number. Also checks that done comes log2(32) = 5 cycles after start.
module tb_rns_reverse;
  import rns_pkg::*;

  localparam int unsigned S  = DEF_S;
  localparam int unsigned WA = 5;
  localparam int unsigned W  = 17;
  localparam int unsigned NC = 32;
  localparam longint unsigned M = 77520;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                 preload_en, start, busy, done;
  logic [NC-1:0]        preload_bits;
  logic [S-1:0][WA-1:0] alpha_in;
  logic [W-1:0]         n_out;

  rns_reverse dut (.*);

  longint unsigned q [NC];

  initial begin
    int c = 0;
    foreach (q[j]) q[j] = 0;
    for (int i = 0; i < S; i++)
      for (int k = 0; k < rns_tb_pkg::bits_for(DEF_MODULI[i]); k++)
        q[c++] = rns_tb_pkg::crt_weight(DEF_MODULI[i], M, k);
    preload_en = 0; start = 0; alpha_in = '0; preload_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = W - 1; k >= 0; k--) begin
      @(negedge clk);
      preload_en = 1;
      for (int j = 0; j < NC; j++) preload_bits[j] = 1'(q[j] >> k);
    end
    @(negedge clk);
    preload_en = 0;
    for (int t = 0; t < 500; t++) begin
      int cyc;
      longint unsigned v;
      v = longint'($urandom) % M;
      if (t == 0) v = 0;
      if (t == 1) v = M - 1;
      if (t == 2) v = 65535;
      @(negedge clk);
      for (int i = 0; i < S; i++) alpha_in[i] = WA'(v % DEF_MODULI[i]);
      start = 1;
      @(negedge clk);
      start = 0; alpha_in = '0;
      cyc = 1;
      while (!done && cyc < 50) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 6) begin  // edges counted include the start edge
        failures++;
        $display("latency %0d, expected 6", cyc);
      end
      checks++;
      if (n_out !== W'(v)) begin
        failures++;
        $display("N=%0d: got %0d", v, n_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
