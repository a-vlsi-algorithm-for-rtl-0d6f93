// tb_rns_part_counter: loads the counter with several presets and checks,
// step by step, that the row is active while the count is above zero,
// drives the bus in exactly the step PRESET + 1 and keeps its gate closed
// from then on; also checks that a new load restarts the sequence.
module tb_rns_part_counter;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       load, step;
  logic [3:0] active, drive, gate;

  for (genvar p = 0; p < 4; p++) begin : g_dut
    rns_part_counter #(.CW(3), .PRESET(p)) dut (
      .clk(clk), .rst_n(rst_n), .load(load), .step(step),
      .active(active[p]), .drive(drive[p]), .gate(gate[p])
    );
  end

  task automatic check_step(int h);
    for (int p = 0; p < 4; p++) begin
      bit e_active = (h <= p);
      bit e_drive  = (h == p + 1);
      bit e_gate   = (h >= p + 1);
      checks++;
      if (active[p] !== e_active || drive[p] !== e_drive || gate[p] !== e_gate) begin
        failures++;
        $display("preset %0d step %0d: active %b drive %b gate %b", p, h,
                 active[p], drive[p], gate[p]);
      end
    end
  endtask

  initial begin
    load = 0; step = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      // step h is executed at the edge after it is checked
      for (int h = 1; h <= 7; h++) begin
        check_step(h);
        step = 1;
        @(negedge clk);
        step = (run == 2) ? 0 : 1;  // run 2: idle cycles in between
        if (run == 2) @(negedge clk);
        if (run == 2) check_step(h + 1);
        step = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
