// rns_cell_row: one row x of the conversion array, the circuit modules
// C(x,0) .. C(x,W-1) plus the row's partitioning counter.
//
// The row adds two W-bit residues modulo MOD in one clock: the bit cells
// form a ripple carry adder and a ripple borrow subtractor (s = a + b,
// d = s - MOD); the sign test at the top slice, sel_sub = c_W | ~borrow_W,
// i.e. "d is not negative", is fed back to all slices to choose d or s.
// Operands are the data line and either register R1 (first step) or the
// accumulator A (later steps), see rns_bit_cell. Operands must be < MOD, so
// the result is < MOD.
//
// The counter (preset PRESET, wired per row) decides when the row computes,
// when its accumulator drives the bus and when its gate G joins its bus
// section to the row below, see rns_part_counter.
//
// Interface: pl_in carries one serial preload bit for each of the two R
// registers, most significant bit first, W clocks of preload_en to fill
// them. bus_in/bus_out are the W-bit data line above and below the row.
// Timing: one modular addition per clock edge with step high.
module rns_cell_row #(
  parameter int unsigned     W      = 5,
  parameter longint unsigned MOD    = 19,
  parameter int unsigned     CW     = 3,
  parameter int unsigned     PRESET = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         preload_en,
  input  logic [1:0]   pl_in,      // {R1 bit, R0 bit}, MSB first
  input  logic [1:0]   en,         // {b(2x+1), b(2x)}
  input  logic         z_r,
  input  logic         step,
  input  logic         cnt_load,
  input  logic [W-1:0] bus_in,
  output logic [W-1:0] bus_out,
  output logic [W-1:0] acc
);
  localparam logic [W-1:0] MOD_BITS = W'(MOD);

  logic active, drive, gate;
  logic [W:0] c, br;
  logic       sel_sub;
  logic [1:0] pl [W+1];

  rns_part_counter #(.CW(CW), .PRESET(PRESET)) u_cnt (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (cnt_load),
    .step  (step),
    .active(active),
    .drive (drive),
    .gate  (gate)
  );

  assign c[0]    = 1'b0;
  assign br[0]   = 1'b0;
  assign sel_sub = c[W] | ~br[W];
  assign pl[0]   = pl_in;

  for (genvar y = 0; y < W; y++) begin : g_slice
    rns_bit_cell u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .preload_en(preload_en),
      .pl_in     (pl[y]),
      .pl_out    (pl[y+1]),
      .en        (en),
      .z_r       (z_r),
      .step      (step),
      .active    (active),
      .drive     (drive),
      .gate      (gate),
      .bus_in    (bus_in[y]),
      .bus_out   (bus_out[y]),
      .m_bit     (MOD_BITS[y]),
      .c_in      (c[y]),
      .br_in     (br[y]),
      .sel_sub   (sel_sub),
      .c_out     (c[y+1]),
      .br_out    (br[y+1]),
      .acc       (acc[y])
    );
  end
endmodule
