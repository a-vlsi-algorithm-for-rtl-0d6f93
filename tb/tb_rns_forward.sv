// tb_rns_forward: direct converter at its default size (16-bit input,
// moduli 15, 16, 17, 19). Preloads the powers of two modulo each modulus
// serially, converts random and corner-case numbers and compares every
// residue with N mod m_i. Also checks that done comes log2(16) = 4 cycles
// after the start edge and that the result holds until the next start.
module tb_rns_forward;
  import rns_pkg::*;

  localparam int unsigned N  = DEF_N_BITS;
  localparam int unsigned S  = DEF_S;
  localparam int unsigned WA = 5;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic                preload_en, start, busy, done;
  logic [S-1:0][N-1:0] preload_bits;
  logic [N-1:0]        n_in;
  logic [S-1:0][WA-1:0] alpha;

  rns_forward dut (.*);

  initial begin
    preload_en = 0; start = 0; n_in = 0; preload_bits = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = WA - 1; k >= 0; k--) begin
      @(negedge clk);
      preload_en = 1;
      for (int i = 0; i < S; i++)
        for (int j = 0; j < N; j++)
          preload_bits[i][j] = 1'(rns_tb_pkg::pow2mod(j, DEF_MODULI[i]) >> k);
    end
    @(negedge clk);
    preload_en = 0;
    for (int t = 0; t < 500; t++) begin
      int cyc = 0;
      logic [N-1:0] v;
      v = N'($urandom);
      if (t == 0) v = '0;
      if (t == 1) v = '1;
      if (t == 2) v = N'(1);
      @(negedge clk);
      n_in = v; start = 1;
      @(negedge clk);
      start = 0; n_in = N'($urandom);  // input may change once captured
      cyc = 1;
      while (!done && cyc < 50) begin
        @(negedge clk);
        cyc++;
      end
      checks++;
      if (cyc != 5) begin  // edges counted include the start edge
        failures++;
        $display("latency %0d, expected 5", cyc);
      end
      for (int i = 0; i < S; i++) begin
        checks++;
        if (alpha[i] !== WA'(v % DEF_MODULI[i])) begin
          failures++;
          $display("N=%0d m=%0d: got %0d expected %0d", v, DEF_MODULI[i], alpha[i],
                   v % DEF_MODULI[i]);
        end
      end
      repeat (2) @(negedge clk);
      checks++;
      if (alpha[0] !== WA'(v % DEF_MODULI[0])) failures++;
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
