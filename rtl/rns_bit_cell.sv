// rns_bit_cell: circuit module C(x,y) of the conversion array, i.e. bit y of
// row x.
//
// It holds bit y of the two preloaded storage registers R of row x (R0 for
// input bit b(2x), R1 for b(2x+1)), bit y of the accumulator A, a one-bit
// processing element and bit y of the bus gate G.
//
//  * Preload: while preload_en is high the two R bits take pl_in and pass
//    their old values to pl_out, so the R bits of a row form two shift
//    registers running from slice 0 to slice W-1 (serial preloading).
//  * Data line: in the first step (z_r high) R0 drives it if its enable E is
//    set, otherwise it carries zero; later the accumulator drives it in the
//    one step in which the row's counter is at zero. The line is also joined
//    to the section above when that row's gate is closed (bus_in).
//  * PE operands: the data line and, in the first step, R1 gated by its
//    enable, in later steps the own accumulator.
//  * A takes the PE result in every step in which the row is active.
//  * bus_out is the data line passed through gate G to the row below.
//
// The register/PE/accumulator/gate split and the use of Z_R follow the
// method; the wired-OR modelling of the tristate data line (only one driver
// is ever connected to a section) is this implementation's choice.
// Timing: registers update on the rising edge; all else is combinational.
module rns_bit_cell (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       preload_en,
  input  logic [1:0] pl_in,    // serial preload bits from slice y-1 (R1,R0)
  output logic [1:0] pl_out,   // R bits passed to slice y+1
  input  logic [1:0] en,       // enables E: {b(2x+1), b(2x)}
  input  logic       z_r,      // first step: registers R on the bus
  input  logic       step,     // a reduction step is executed this cycle
  input  logic       active,   // row PE active in this step
  input  logic       drive,    // row accumulator drives the data line
  input  logic       gate,     // gate G closed
  input  logic       bus_in,   // data line from the section above
  output logic       bus_out,  // data line through G to the section below
  input  logic       m_bit,    // modulus bit y
  input  logic       c_in,
  input  logic       br_in,
  input  logic       sel_sub,
  output logic       c_out,
  output logic       br_out,
  output logic       acc       // accumulator bit
);
  logic r0, r1;
  logic line, op_b, res;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= 1'b0;
      r1 <= 1'b0;
    end else if (preload_en) begin
      r0 <= pl_in[0];
      r1 <= pl_in[1];
    end
  end

  assign pl_out = {r1, r0};

  always_comb begin
    line    = (z_r & en[0] & r0) | (drive & acc) | bus_in;
    op_b    = z_r ? (en[1] & r1) : acc;
    bus_out = gate & line;
  end

  rns_pe_bit u_pe (
    .a      (line),
    .b      (op_b),
    .m_bit  (m_bit),
    .c_in   (c_in),
    .br_in  (br_in),
    .sel_sub(sel_sub),
    .c_out  (c_out),
    .br_out (br_out),
    .r      (res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              acc <= 1'b0;
    else if (step && active) acc <= res;
  end
endmodule
