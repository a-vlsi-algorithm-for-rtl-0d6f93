// rns_part_counter: bus-partitioning counter of one row of the array.
//
// The counter is loaded with a wired preset before every conversion run and
// counts down once per step. While it is above zero the row's PE takes part
// in the step. In the step in which it reaches zero the row's accumulator
// drives the data bus and the row's gate G connects its bus section to the
// section below; after that the row is idle and its gate stays closed.
// With preset v2(x+1)+1 for row x this reproduces the pairwise reduction of
// the tree: at step h the active rows are those with (x+1) divisible by
// 2^(h-1). The wired preset and the zero crossing follow the method; the
// exact encoding (a down counter plus an "expired" flag) is this
// implementation's choice. Counter width is clog2(log2 n + 2) bits.
//
// Timing: load and step are sampled on the rising clock edge; the outputs
// are decoded from the registered state and refer to the step executed at
// the next edge.
module rns_part_counter #(
  parameter int unsigned CW     = 3,  // counter width
  parameter int unsigned PRESET = 1   // wired preset value
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,   // initialise with PRESET (start of a run)
  input  logic step,   // one reduction step is executed
  output logic active, // count > 0: the row's PE computes in this step
  output logic drive,  // count == 0: the row's A drives the bus
  output logic gate    // gate G closed (bus section joined to the one below)
);
  logic [CW-1:0] cnt;
  logic          expired;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      expired <= 1'b1;
    end else if (load) begin
      cnt     <= CW'(PRESET);
      expired <= 1'b0;
    end else if (step && !expired) begin
      if (cnt == '0) expired <= 1'b1;
      else           cnt     <= cnt - 1'b1;
    end
  end

  always_comb begin
    active = !expired && (cnt != '0);
    drive  = !expired && (cnt == '0);
    gate   = expired || (cnt == '0);
  end
endmodule
