// mp_max_cmp: the max comparator of the max-pooling block.
//
// Among the valid entries of the pooling window it finds the one with the
// highest membrane potential and, when the controller says the window is
// complete (load), registers that potential and the spike flag of the same
// neuron. This is the published pooling rule: the neuron with the highest
// current potential is chosen, and its spike is what the next layer
// receives. This design's own choices: potentials are compared as two's
// complement (they can go negative), and ties go to the entry scanned first,
// in the order (i,j) = (0,0),(0,1),...,(1,0),..., i.e. the neuron that
// arrived latest.
// Timing: max_pot_o, spike_o and valid_o appear one clock after load.
module mp_max_cmp #(
  parameter int unsigned NP_MAX = mp_pkg::MP_NP_MAX,
  parameter int unsigned DW     = mp_pkg::MP_DW
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   load,
  input  logic                                   last_i,
  input  logic [NP_MAX-1:0][NP_MAX-1:0][DW:0]    win,   // {spike, potential}
  input  logic [NP_MAX-1:0][NP_MAX-1:0]          mask,
  output logic                                   valid_o,
  output logic                                   last_o,
  output logic signed [DW-1:0]                   max_pot_o,
  output logic                                   spike_o
);

  logic signed [DW-1:0] best_pot;
  logic                 best_spk;
  logic                 found;

  always_comb begin
    best_pot = '0;
    best_spk = 1'b0;
    found    = 1'b0;
    for (int unsigned i = 0; i < NP_MAX; i++) begin
      for (int unsigned j = 0; j < NP_MAX; j++) begin
        logic signed [DW-1:0] p;
        p = win[i][j][DW-1:0];
        if (mask[i][j] && (!found || p > best_pot)) begin
          best_pot = p;
          best_spk = win[i][j][DW];
          found    = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o   <= 1'b0;
      last_o    <= 1'b0;
      max_pot_o <= '0;
      spike_o   <= 1'b0;
    end else begin
      valid_o <= load;
      last_o  <= load && last_i;
      if (load) begin
        max_pot_o <= best_pot;
        spike_o   <= best_spk;
      end
    end
  end

endmodule
