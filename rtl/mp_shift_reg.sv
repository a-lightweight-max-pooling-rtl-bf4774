// mp_shift_reg: the line buffer of the max-pooling block.
//
// A chain of LEN stages, each holding one stream entry of W bits (the spike
// flag and the membrane potential of one neuron). On every cycle with
// shift_en high the incoming entry enters stage 0 and every stage moves one
// place on; stage k therefore holds the entry that arrived k+1 accepted
// inputs ago. All stages are visible on taps_o so that the window
// multiplexer can pick the neurons of the rows above. With the default
// length n+1 the stages are numbered 0..n, as in the published block diagram.
// Stages are cleared by the synchronous-active-low reset (a choice of this
// design; the stages are overwritten before any window reads them anyway).
// Timing: taps_o changes one clock after an accepted input.
module mp_shift_reg #(
  parameter int unsigned W   = mp_pkg::MP_DW + 1,
  parameter int unsigned LEN = mp_pkg::sr_len(mp_pkg::MP_N, mp_pkg::MP_NP_MAX)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  shift_en,
  input  logic [W-1:0]          din,
  output logic [LEN-1:0][W-1:0] taps_o
);

  logic [LEN-1:0][W-1:0] stage_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stage_q <= '0;
    end else if (shift_en) begin
      stage_q[0] <= din;
      for (int unsigned k = 1; k < LEN; k++) stage_q[k] <= stage_q[k-1];
    end
  end

  assign taps_o = stage_q;

endmodule
