// tb_rns_tree: two arrays (16 cells of 5 bits modulo 19, and 8 cells of 17
// bits modulo 77520) loaded with random constants below the modulus and
// run with random enables. Step signals are driven directly, as rns_ctrl
// would: counters initialised, log2(NC) steps with Z_R in the first. The
// result after the last step is compared with the sum of the enabled
// constants modulo the modulus, computed here.
module tb_rns_tree;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int unsigned NA = 16, WA_ = 5;
  localparam longint unsigned MA = 19;
  localparam int unsigned NB = 8, WB = 17;
  localparam longint unsigned MB = 77520;

  logic preload_en, z_r, step, cnt_load;
  logic [NA-1:0] pl_a, en_a;
  logic [NB-1:0] pl_b, en_b;
  logic [WA_-1:0] res_a;
  logic [WB-1:0]  res_b;

  rns_tree #(.NC(NA), .W(WA_), .MOD(MA)) dut_a (
    .clk(clk), .rst_n(rst_n), .preload_en(preload_en), .pl_bits(pl_a), .en(en_a),
    .z_r(z_r), .step(step), .cnt_load(cnt_load), .result(res_a));
  rns_tree #(.NC(NB), .W(WB), .MOD(MB)) dut_b (
    .clk(clk), .rst_n(rst_n), .preload_en(preload_en), .pl_bits(pl_b), .en(en_b),
    .z_r(z_r), .step(step), .cnt_load(cnt_load), .result(res_b));

  longint unsigned ca [NA];
  longint unsigned cb [NB];

  task automatic preload();
    for (int j = 0; j < NA; j++) ca[j] = $urandom % MA;
    for (int j = 0; j < NB; j++) cb[j] = (longint'($urandom) << 8 ^ $urandom) % MB;
    for (int k = WB - 1; k >= 0; k--) begin
      @(negedge clk);
      preload_en = 1;
      for (int j = 0; j < NA; j++) pl_a[j] = (k < WA_) ? 1'(ca[j] >> k) : 1'b0;
      for (int j = 0; j < NB; j++) pl_b[j] = 1'(cb[j] >> k);
    end
    @(negedge clk);
    preload_en = 0;
  endtask

  initial begin
    {preload_en, z_r, step, cnt_load} = '0;
    pl_a = 0; pl_b = 0; en_a = 0; en_b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 20; p++) begin
      preload();
      for (int t = 0; t < 20; t++) begin
        longint unsigned va [] = new[NA];
        longint unsigned vb [] = new[NB];
        int unsigned corr = 0;
        longint unsigned ea, eb;
        en_a = NA'($urandom);
        en_b = NB'($urandom);
        if (t == 0) begin en_a = '1; en_b = '1; end
        if (t == 1) begin en_a = '0; en_b = '0; end
        for (int j = 0; j < NA; j++) va[j] = en_a[j] ? ca[j] : 0;
        for (int j = 0; j < NB; j++) vb[j] = en_b[j] ? cb[j] : 0;
        ea = rns_tb_pkg::tree_sum(va, MA, corr);
        eb = rns_tb_pkg::tree_sum(vb, MB, corr);
        cnt_load = 1;
        @(negedge clk);
        cnt_load = 0;
        for (int h = 1; h <= 4; h++) begin
          z_r  = (h == 1);
          step = 1;
          @(negedge clk);
          if (h == 3) begin
            // the smaller array is done after three steps
            checks++;
            if (res_b !== WB'(eb)) begin
              failures++;
              $display("B: got %0d expected %0d", res_b, eb);
            end
          end
        end
        step = 0; z_r = 0;
        checks++;
        if (res_a !== WA_'(ea)) begin
          failures++;
          $display("A: got %0d expected %0d", res_a, ea);
        end
        @(negedge clk);
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
