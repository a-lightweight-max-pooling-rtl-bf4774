// mp_window_mux: the multiplexer between the line buffer and the comparator.
//
// For the neuron that is arriving now, at row r and column c of the frame,
// it gathers the pooling window whose bottom-right corner is that neuron.
// Window element (i,j) is the neuron i rows up and j columns left, i.e. the
// one that arrived a = i*frame_w + j inputs earlier: a = 0 is the incoming
// entry itself, otherwise it sits in shift-register stage a-1. Because the
// frame width is a run-time setting (any width up to n), the stage index of
// every element with i > 0 is a run-time choice, which is what the
// multiplexer does. Elements with i or j at or beyond the configured pool
// size are flagged invalid in mask_o so that the comparator ignores them.
// The published design has a multiplexer between the shift register and the
// comparator; this stage mapping and the run-time frame width are this
// design's way of realising it.
// Elements of the bottom row (i = 0) need no choice: they are the incoming
// entry and the first stages. Purely combinational. Which neuron counts as
// "the window" and when the window is complete is decided by the controller.
module mp_window_mux #(
  parameter int unsigned N      = mp_pkg::MP_N,
  parameter int unsigned NP_MAX = mp_pkg::MP_NP_MAX,
  parameter int unsigned W      = mp_pkg::MP_DW + 1,
  parameter int unsigned LEN    = mp_pkg::sr_len(N, NP_MAX),
  parameter int unsigned CW     = mp_pkg::cnt_w(N)
) (
  input  logic [CW-1:0]                        frame_w,   // 1..N
  input  logic [CW-1:0]                        pool_size, // 1..NP_MAX
  input  logic [W-1:0]                         din,       // incoming entry
  input  logic [LEN-1:0][W-1:0]                taps,      // shift-register stages
  output logic [NP_MAX-1:0][NP_MAX-1:0][W-1:0] win_o,     // [i][j]
  output logic [NP_MAX-1:0][NP_MAX-1:0]        mask_o
);

  localparam int unsigned AW = $clog2(LEN + 2) + 1;

  always_comb begin
    for (int unsigned i = 0; i < NP_MAX; i++) begin
      for (int unsigned j = 0; j < NP_MAX; j++) begin
        logic [AW-1:0] age;
        age = AW'(i) * AW'(frame_w) + AW'(j);
        mask_o[i][j] = (i < 32'(pool_size)) && (j < 32'(pool_size));
        if (age == '0) begin
          win_o[i][j] = din;
        end else if (age <= AW'(LEN)) begin
          win_o[i][j] = taps[age - AW'(1)];
        end else begin
          // Only reachable with an out-of-range frame width.
          win_o[i][j] = '0;
        end
      end
    end
  end

endmodule
