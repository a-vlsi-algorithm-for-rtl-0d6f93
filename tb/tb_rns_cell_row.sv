// tb_rns_cell_row: one row (W = 5, modulus 19, preset 2) run through many
// conversion-like sequences: random residues are preloaded serially, step 1
// must leave (en0 ? R0 : 0) + (en1 ? R1 : 0) mod 19 in the accumulator,
// step 2 must add the value arriving on bus_in modulo 19, the gate must
// stay open (bus_out = 0) while the row is active, and in step 3 the row
// must put its accumulator on bus_out without changing it.
module tb_rns_cell_row;
  localparam int unsigned W = 5;
  localparam int unsigned M = 19;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int corrections = 0;
  always #5 clk = ~clk;

  logic         preload_en, z_r, step, cnt_load;
  logic [1:0]   pl_in, en;
  logic [W-1:0] bus_in, bus_out, acc;

  rns_cell_row #(.W(W), .MOD(M), .CW(3), .PRESET(2)) dut (.*);

  task automatic chk(logic [W-1:0] got, int exp, string what);
    checks++;
    if (got !== W'(exp)) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    {preload_en, z_r, step, cnt_load} = '0;
    pl_in = 0; en = 0; bus_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int v0, v1, vb, e;
      v0 = $urandom % M;
      v1 = $urandom % M;
      vb = $urandom % M;
      // serial preload, MSB first
      for (int k = W - 1; k >= 0; k--) begin
        @(negedge clk);
        preload_en = 1;
        pl_in = {1'(v1 >> k), 1'(v0 >> k)};
      end
      @(negedge clk);
      preload_en = 0;
      en = 2'($urandom);
      cnt_load = 1;
      @(negedge clk);
      cnt_load = 0;
      // step 1
      z_r = 1; step = 1;
      bus_in = 0;  // the gate above is open in step 1
      #1 chk(bus_out, 0, "bus_out step 1");
      @(negedge clk);
      e = (en[0] ? v0 : 0) + (en[1] ? v1 : 0);
      if (e >= M) begin e -= M; corrections++; end
      chk(acc, e, "step 1");
      // step 2: add the bus value
      z_r = 0; bus_in = W'(vb);
      #1 chk(bus_out, 0, "bus_out step 2");
      @(negedge clk);
      if (e + vb >= M) corrections++;
      e = (e + vb) % M;
      chk(acc, e, "step 2");
      // step 3: counter reaches zero: drive the bus, keep the value
      bus_in = 0;
      #1 chk(bus_out, e, "bus_out step 3");
      @(negedge clk);
      step = 0;
      chk(acc, e, "step 3");
    end
    checks++;
    if (corrections == 0) failures++;
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
