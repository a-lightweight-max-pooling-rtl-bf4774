// mp_controller: position, stride and configuration control of the
// max-pooling block.
//
// Neuron potentials arrive in raster order, one per cycle with in_valid high
// (gaps allowed). The controller keeps the row and column of the arriving
// neuron and, for each axis, a stride phase that is 0 at the first window
// position (index Np-1) and counts modulo the stride from there. A pooling
// window ends at the arriving neuron when both indices are at least Np-1 and
// both phases are 0; win_done then tells the max comparator to take the
// window. win_last marks the last window of the frame (no further window fits
// to the right or below). After the last neuron of a frame all counters
// return to 0, so the next frame (the next time step or the next channel)
// follows without any gap.
//
// The configuration (frame width/height, pool size Np, stride s) is sampled
// with the first neuron of each frame and held until the frame ends, so the
// cfg inputs may change at any time and take effect at the next frame. The
// held frame width and pool size drive the window multiplexer (sel_frame_w,
// sel_pool_size); during the first neuron they come straight from the inputs.
// That the controller steers both the multiplexer and the comparator follows
// the published block diagram; the counters, the ranges (frame 1..n,
// Np 1..NP_MAX, s 1..n) and the per-frame sampling are this design's.
// Timing: win_done, win_last and the select outputs are combinational on the
// current input and the held state.
module mp_controller #(
  parameter int unsigned N      = mp_pkg::MP_N,
  parameter int unsigned NP_MAX = mp_pkg::MP_NP_MAX,
  parameter int unsigned CW     = mp_pkg::cnt_w(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [CW-1:0] frame_w,
  input  logic [CW-1:0] frame_h,
  input  logic [CW-1:0] pool_size,
  input  logic [CW-1:0] stride,
  output logic          win_done,
  output logic          win_last,
  output logic [CW-1:0] sel_frame_w,
  output logic [CW-1:0] sel_pool_size
);

  typedef struct packed {
    logic [CW-1:0] fw;
    logic [CW-1:0] fh;
    logic [CW-1:0] np;
    logic [CW-1:0] s;
  } cfg_t;

  cfg_t          cfg_q, cfg;
  logic [CW-1:0] row_q, col_q, rph_q, cph_q;
  logic          first, row_end, frame_end, col_first_win, row_first_win;

  // First neuron of a frame: use (and capture) the live configuration.
  assign first = (row_q == '0) && (col_q == '0);
  assign cfg   = first ? cfg_t'{fw: frame_w, fh: frame_h, np: pool_size, s: stride} : cfg_q;

  assign sel_frame_w   = cfg.fw;
  assign sel_pool_size = cfg.np;

  assign col_first_win = col_q >= cfg.np - CW'(1);
  assign row_first_win = row_q >= cfg.np - CW'(1);
  assign row_end       = col_q == cfg.fw - CW'(1);
  assign frame_end     = in_valid && row_end && (row_q == cfg.fh - CW'(1));

  assign win_done = in_valid && col_first_win && row_first_win &&
                    (cph_q == '0) && (rph_q == '0);
  // Last window: one more stride would leave the frame on both axes.
  assign win_last = win_done &&
                    ({1'b0, col_q} + {1'b0, cfg.s} >= {1'b0, cfg.fw}) &&
                    ({1'b0, row_q} + {1'b0, cfg.s} >= {1'b0, cfg.fh});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg_q <= '0;
      row_q <= '0;
      col_q <= '0;
      rph_q <= '0;
      cph_q <= '0;
    end else if (in_valid) begin
      if (first) cfg_q <= cfg;
      if (row_end) begin
        col_q <= '0;
        cph_q <= '0;
        if (frame_end) begin
          row_q <= '0;
          rph_q <= '0;
        end else begin
          row_q <= row_q + CW'(1);
          if (row_first_win) rph_q <= (rph_q == cfg.s - CW'(1)) ? '0 : rph_q + CW'(1);
        end
      end else begin
        col_q <= col_q + CW'(1);
        if (col_first_win) cph_q <= (cph_q == cfg.s - CW'(1)) ? '0 : cph_q + CW'(1);
      end
    end
  end

`ifndef SYNTHESIS
  // Configuration rules, checked on the configuration in force whenever a
  // neuron is accepted.
  a_cfg_pool : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (cfg.np >= 1 && 32'(cfg.np) <= NP_MAX));
  a_cfg_stride : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (cfg.s >= 1));
  a_cfg_frame : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (cfg.fw >= cfg.np && cfg.fh >= cfg.np &&
                  32'(cfg.fw) <= N && 32'(cfg.fh) <= N));
`endif

endmodule
