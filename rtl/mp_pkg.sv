// mp_pkg: constants and helpers shared by the spiking max-pooling block.
//
// The block streams membrane potentials of a spiking convolutional layer and,
// for every pooling window, forwards the potential and the spike of the neuron
// with the highest potential. The defaults below are the published
// configuration: a 32 x 32 maximum frame, 16-bit potentials and the 2 x 2
// pooling window used by every pooling layer of the evaluated networks.
// Each stream entry is one neuron: {spike, potential}, potential in two's
// complement (signedness is this design's choice).
package mp_pkg;

  // Maximum frame side n (frame of n x n neurons).
  localparam int unsigned MP_N      = 32;
  // Potential precision in bits.
  localparam int unsigned MP_DW     = 16;
  // Largest pooling window side Np the hardware is built for.
  localparam int unsigned MP_NP_MAX = 2;

  // Width of a counter or configuration field that must hold 0..n.
  function automatic int unsigned cnt_w(input int unsigned n);
    return (n < 2) ? 1 : $clog2(n + 1);
  endfunction

  // Number of shift-register stages needed so that the incoming neuron plus
  // the stages cover an np x np window over a frame of width n:
  // (np-1)*n + np - 1. For np = 2 this is n+1 stages, numbered 0..n.
  function automatic int unsigned sr_len(input int unsigned n, input int unsigned np);
    return (np < 2) ? 1 : (np - 1) * n + np - 1;
  endfunction

endpackage
