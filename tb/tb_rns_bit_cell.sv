// tb_rns_bit_cell: random stimulus on one circuit module C(x,y). The
// testbench tracks the two R bits and the accumulator bit itself and
// checks the serial preload path, the data line seen below the gate, the
// carry and borrow of the PE and the accumulator update.
module tb_rns_bit_cell;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       preload_en, z_r, step, active, drive, gate, bus_in, m_bit;
  logic       c_in, br_in, sel_sub, c_out, br_out, acc, bus_out;
  logic [1:0] pl_in, pl_out, en;

  rns_bit_cell dut (.*);

  bit r0_m, r1_m, acc_m;

  initial begin
    {preload_en, z_r, step, active, drive, gate, bus_in, m_bit, c_in, br_in, sel_sub} = '0;
    pl_in = 0; en = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    r0_m = 0; r1_m = 0; acc_m = 0;
    for (int t = 0; t < 2000; t++) begin
      bit line, opb, s, cy, d, bo, r;
      @(negedge clk);
      preload_en = ($urandom % 4 == 0);
      pl_in      = 2'($urandom);
      en         = 2'($urandom);
      z_r        = 1'($urandom);
      step       = 1'($urandom);
      active     = 1'($urandom);
      drive      = 1'($urandom);
      gate       = 1'($urandom);
      bus_in     = 1'($urandom);
      m_bit      = 1'($urandom);
      c_in       = 1'($urandom);
      br_in      = 1'($urandom);
      sel_sub    = 1'($urandom);
      #1;
      line = (z_r && en[0] && r0_m) || (drive && acc_m) || bus_in;
      opb  = z_r ? (en[1] && r1_m) : acc_m;
      s    = line ^ opb ^ c_in;
      cy   = (int'(line) + int'(opb) + int'(c_in)) >= 2;
      d    = s ^ m_bit ^ br_in;
      bo   = (int'(s) - int'(m_bit) - int'(br_in)) < 0;
      r    = sel_sub ? d : s;
      checks++;
      if (bus_out !== (gate && line)) failures++;
      checks++;
      if (c_out !== cy || br_out !== bo) failures++;
      checks++;
      if (pl_out !== {r1_m, r0_m}) failures++;
      @(posedge clk);
      if (preload_en) begin
        r0_m = pl_in[0];
        r1_m = pl_in[1];
      end
      if (step && active) acc_m = r;
      #1;
      checks++;
      if (acc !== acc_m) begin
        failures++;
        $display("t=%0d acc %b expected %b", t, acc, acc_m);
      end
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
