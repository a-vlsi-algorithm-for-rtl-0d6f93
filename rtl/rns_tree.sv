// rns_tree: the conversion array for one modulus: NC preloaded cells of W
// bits, arranged as NC/2 rows joined by one partitioned data bus, that sum
// the enabled cell contents modulo MOD.
//
// Cell j holds a constant c_j (preloaded serially) and is enabled by input
// bit en[j]. The result is ( sum over j with en[j] = 1 of c_j ) mod MOD.
// For the direct conversion c_j = 2^j mod m and en = the bits of N, giving
// N mod m; for the reverse conversion the cells hold the weights of the
// residue bits.
//
// The sum is formed in log2(NC) steps, one per clock: in step 1 every row
// adds its two enabled cells; in step h the row x with (x+1) divisible by
// 2^(h-1) adds to its accumulator the accumulator of row x - 2^(h-2), which
// reaches it over the data bus. Each row's gate G opens or closes the bus
// between it and the next row; the gates are set by the rows' own counters
// (wired preset v2(x+1)+1), so in every step each connected bus section has
// exactly one driver. The result is in the accumulator of the last row.
//
// Interface: pl_bits[j] is the serial preload line of cell j (MSB first, W
// clocks of preload_en). z_r, step and cnt_load come from rns_ctrl.
// Constraint: NC is a power of two, at least 2; preloaded values < MOD.
module rns_tree #(
  parameter int unsigned     NC  = 16,
  parameter int unsigned     W   = 5,
  parameter longint unsigned MOD = 19
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          preload_en,
  input  logic [NC-1:0] pl_bits,
  input  logic [NC-1:0] en,
  input  logic          z_r,
  input  logic          step,
  input  logic          cnt_load,
  output logic [W-1:0]  result
);
  import rns_pkg::*;

  localparam int unsigned ROWS  = NC / 2;
  localparam int unsigned STEPS = log2_exact(NC);
  localparam int unsigned CW    = bits_for(64'(STEPS) + 64'd2);

  // bus[x] is the data line entering row x from above; bus[0] is the
  // open upper end of the bus.
  logic [W-1:0] bus [ROWS+1];
  logic [W-1:0] acc [ROWS];

  assign bus[0] = '0;

  for (genvar x = 0; x < ROWS; x++) begin : g_row
    rns_cell_row #(
      .W     (W),
      .MOD   (MOD),
      .CW    (CW),
      .PRESET(row_preset(x))
    ) u_row (
      .clk       (clk),
      .rst_n     (rst_n),
      .preload_en(preload_en),
      .pl_in     (pl_bits[2*x+1 -: 2]),
      .en        (en[2*x+1 -: 2]),
      .z_r       (z_r),
      .step      (step),
      .cnt_load  (cnt_load),
      .bus_in    (bus[x]),
      .bus_out   (bus[x+1]),
      .acc       (acc[x])
    );
  end

  assign result = acc[ROWS-1];

  initial begin
    assert ((1 << STEPS) == NC && NC >= 2)
      else $error("rns_tree: NC must be a power of two >= 2");
    assert (MOD >= 2 && MOD <= (64'd1 << W))
      else $error("rns_tree: MOD must fit in W bits");
  end
endmodule
