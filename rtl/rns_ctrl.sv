// rns_ctrl: sequencer of one conversion run.
//
// On start (accepted only while idle) it asks for the operand to be captured
// (load_in) and for every row counter to be initialised with its wired
// preset (cnt_load). It then runs STEPS reduction steps, one per clock, with
// Z_R high in the first of them, so that the preloaded registers R drive the
// data bus only in step 1. In the clock after the last step it pulses done;
// the result then stays in the array's last accumulator until the next run.
//
// Timing, with the edge that samples start counted as edge 0: the steps are
// executed at edges 1 .. STEPS, and done is high for the one cycle that
// follows edge STEPS, together with the final result.
// The method names the Z_R line and the counter initialisation; the handshake
// (start/busy/done) is this implementation's choice.
module rns_ctrl #(
  parameter int unsigned STEPS = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load_in,   // capture the operand (same cycle as start)
  output logic cnt_load,  // initialise the row counters
  output logic z_r,       // first step
  output logic step,      // a step is executed at the next edge
  output logic busy,
  output logic done
);
  import rns_pkg::*;

  localparam int unsigned KW = bits_for(64'(STEPS) + 64'd2);

  typedef enum logic [0:0] {IDLE, RUN} state_t;

  state_t        state;
  logic [KW-1:0] k;      // number of the step being executed (1-based)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      k     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= RUN;
          k     <= KW'(1);
        end
        RUN: begin
          if (k == KW'(STEPS)) begin
            state <= IDLE;
            done  <= 1'b1;
          end
          k <= k + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    load_in  = (state == IDLE) && start;
    cnt_load = load_in;
    busy     = (state == RUN);
    step     = busy;
    z_r      = busy && (k == KW'(1));
  end

  // A run never overlaps a second start request being accepted.
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !load_in);
endmodule
