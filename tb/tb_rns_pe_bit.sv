// tb_rns_pe_bit: exhaustive check of the one-bit PE slice against the
// truth tables of a full adder, a full subtractor and a 2:1 multiplexer.
module tb_rns_pe_bit;
  logic a, b, m_bit, c_in, br_in, sel_sub;
  logic c_out, br_out, r;
  int checks = 0, failures = 0;

  rns_pe_bit dut (.*);

  initial begin
    for (int v = 0; v < 64; v++) begin
      int s_full, d_full;
      {a, b, m_bit, c_in, br_in, sel_sub} = 6'(v);
      #1;
      s_full = int'(a) + int'(b) + int'(c_in);          // 0..3
      d_full = (s_full & 1) - int'(m_bit) - int'(br_in); // -2..1
      checks++;
      if (c_out !== (s_full >= 2)) failures++;
      checks++;
      if (br_out !== (d_full < 0)) failures++;
      checks++;
      if (r !== (sel_sub ? 1'((d_full + 4) & 1) : 1'(s_full & 1))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
