// mp_maxpool: streaming max-pooling block for spiking convolutional networks.
//
// The convolutional core streams the membrane potential of each of its
// neurons in raster order, once per time step, together with the spike that
// neuron emits in that step. For every pooling window the block forwards the
// potential and the spike of the neuron whose potential is highest, so the
// next layer receives the spikes of the (approximately) most active neuron
// without any spike counters or extra neurons.
//
// Structure, as in the published block diagram: a shift register of n+1
// stages (for the default 2x2 window) holds the last row of the frame; a
// multiplexer picks the Np x Np window entries for the frame width and pool
// size in force; a controller samples the configuration at the start of each
// frame, steers the multiplexer, tracks row, column and stride phase and
// tells the max comparator when a window is complete; the max comparator
// selects the winner and registers it.
//
// Interface: one neuron per cycle when in_valid is high (no back-pressure;
// gaps are allowed). cfg_* is sampled with the first neuron of each frame.
// out_valid pulses one clock after the neuron that completes a window; outputs
// come in raster order of the pooled map, out_last flags the last one of a
// frame. A frame of W x H neurons takes W*H input cycles and frames can follow
// back to back. Potentials are 16-bit two's complement by default.
module mp_maxpool #(
  parameter int unsigned N      = mp_pkg::MP_N,
  parameter int unsigned DW     = mp_pkg::MP_DW,
  parameter int unsigned NP_MAX = mp_pkg::MP_NP_MAX,
  parameter int unsigned CW     = mp_pkg::cnt_w(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration
  input  logic [CW-1:0]        cfg_frame_w,
  input  logic [CW-1:0]        cfg_frame_h,
  input  logic [CW-1:0]        cfg_pool_size,
  input  logic [CW-1:0]        cfg_stride,
  // input stream from the convolutional core
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_pot,
  input  logic                 in_spike,
  // pooled output stream
  output logic                 out_valid,
  output logic signed [DW-1:0] out_pot,
  output logic                 out_spike,
  output logic                 out_last
);

  localparam int unsigned W   = DW + 1;
  localparam int unsigned LEN = mp_pkg::sr_len(N, NP_MAX);

  logic [W-1:0]                         din;
  logic [LEN-1:0][W-1:0]                taps;
  logic [NP_MAX-1:0][NP_MAX-1:0][W-1:0] win;
  logic [NP_MAX-1:0][NP_MAX-1:0]        mask;
  logic                                 win_done, win_last;
  logic [CW-1:0]                        sel_frame_w, sel_pool_size;

  assign din = {in_spike, in_pot};

  mp_shift_reg #(.W(W), .LEN(LEN)) u_sr (
    .clk, .rst_n, .shift_en(in_valid), .din, .taps_o(taps)
  );

  mp_window_mux #(.N(N), .NP_MAX(NP_MAX), .W(W), .LEN(LEN), .CW(CW)) u_mux (
    .frame_w(sel_frame_w), .pool_size(sel_pool_size), .din, .taps,
    .win_o(win), .mask_o(mask)
  );

  mp_controller #(.N(N), .NP_MAX(NP_MAX), .CW(CW)) u_ctrl (
    .clk, .rst_n, .in_valid,
    .frame_w(cfg_frame_w), .frame_h(cfg_frame_h),
    .pool_size(cfg_pool_size), .stride(cfg_stride),
    .win_done, .win_last, .sel_frame_w, .sel_pool_size
  );

  mp_max_cmp #(.NP_MAX(NP_MAX), .DW(DW)) u_cmp (
    .clk, .rst_n, .load(win_done), .last_i(win_last), .win, .mask,
    .valid_o(out_valid), .last_o(out_last), .max_pot_o(out_pot), .spike_o(out_spike)
  );

endmodule
