// tb_rns_ctrl: checks the run sequence of the controller (STEPS = 4 and 5):
// load_in and cnt_load with an accepted start, Z_R in exactly the first
// step, STEPS step cycles, done one cycle after the last step, and that a
// start while busy is ignored.
module tb_rns_ctrl;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic start;
  logic [1:0] load_in, cnt_load, z_r, step, busy, done;

  rns_ctrl #(.STEPS(4)) dut4 (.clk(clk), .rst_n(rst_n), .start(start), .load_in(load_in[0]),
    .cnt_load(cnt_load[0]), .z_r(z_r[0]), .step(step[0]), .busy(busy[0]), .done(done[0]));
  rns_ctrl #(.STEPS(5)) dut5 (.clk(clk), .rst_n(rst_n), .start(start), .load_in(load_in[1]),
    .cnt_load(cnt_load[1]), .z_r(z_r[1]), .step(step[1]), .busy(busy[1]), .done(done[1]));

  // Expected outputs c cycles after the start edge (c = 0: the start cycle).
  task automatic expect_cycle(int i, int steps, int c);
    bit e_load = (c == 0);
    bit e_step = (c >= 1 && c <= steps);
    bit e_zr   = (c == 1);
    bit e_done = (c == steps + 1);
    checks++;
    if (load_in[i] !== e_load || cnt_load[i] !== e_load || step[i] !== e_step ||
        busy[i] !== e_step || z_r[i] !== e_zr || done[i] !== e_done) begin
      failures++;
      $display("steps %0d cycle %0d: load %b step %b zr %b done %b", steps, c,
               load_in[i], step[i], z_r[i], done[i]);
    end
  endtask

  initial begin
    start = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 20; run++) begin
      repeat (run % 3) @(negedge clk);
      @(negedge clk);
      start = 1;
      for (int c = 0; c <= 7; c++) begin
        #1;
        expect_cycle(0, 4, c);
        expect_cycle(1, 5, c);
        @(negedge clk);
        // keep start high during the run in odd runs: must be ignored
        start = (run % 2 == 1) && (c < 3);
      end
      start = 0;
      repeat (2) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
