// tb_rns_workloads: runs the converter under one instance of each of the
// four regimes of moduli the method is analysed for (number of moduli s
// against their size log m):
//   a) s constant, log m ~ n        : n = 16, moduli 256, 257
//   b) s ~ log n, log m ~ n / log n : n = 32, moduli 83, 85, 87, 89, 91
//   c) s ~ n / log n, log m ~ log n : n = 16, moduli 15, 16, 17, 19 (default)
//   d) s ~ n, log m constant        : n = 16, moduli 3, 5, 7, 8, 11, 13
// Every product M lies in [2^n, 2^(n+1)]. Each instance checks direct,
// round-trip and reverse conversions and their latencies.
module tb_rns_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int unsigned MA [2] = '{256, 257};
  localparam int unsigned MB [5] = '{83, 85, 87, 89, 91};
  localparam int unsigned MC [4] = '{15, 16, 17, 19};
  localparam int unsigned MD [6] = '{3, 5, 7, 8, 11, 13};

  logic [3:0] fin;
  int         chk [4];
  int         bad [4];

  rns_roundtrip_check #(.N_BITS(16), .S(2), .MODULI(MA)) u_a (
    .clk(clk), .rst_n(rst_n), .finished(fin[0]), .checks(chk[0]), .failures(bad[0]));
  rns_roundtrip_check #(.N_BITS(32), .S(5), .MODULI(MB)) u_b (
    .clk(clk), .rst_n(rst_n), .finished(fin[1]), .checks(chk[1]), .failures(bad[1]));
  rns_roundtrip_check #(.N_BITS(16), .S(4), .MODULI(MC)) u_c (
    .clk(clk), .rst_n(rst_n), .finished(fin[2]), .checks(chk[2]), .failures(bad[2]));
  rns_roundtrip_check #(.N_BITS(16), .S(6), .MODULI(MD)) u_d (
    .clk(clk), .rst_n(rst_n), .finished(fin[3]), .checks(chk[3]), .failures(bad[3]));

  int checks, failures;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin == 4'hf);
    checks = 0; failures = 0;
    for (int i = 0; i < 4; i++) begin
      $display("regime %c: checks=%0d failures=%0d", 8'("a") + 8'(i), chk[i], bad[i]);
      checks += chk[i];
      failures += bad[i];
      checks++;
      if (chk[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3],
             bad[0] + bad[1] + bad[2] + bad[3] + 1);
    $finish;
  end
endmodule
