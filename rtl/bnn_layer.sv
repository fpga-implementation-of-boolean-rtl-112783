// bnn_layer: a layer of NOUT Boolean neurons that all see the same NIN inputs.
//
// Each neuron is one lookup table (bnn_neuron) whose contents come from the
// packed INIT array: INIT[j] is the table of output j. A neuron whose weight
// for an input is 0 simply has a table that does not depend on that input, so
// the full connection of every input to every neuron costs nothing. The
// defaults build the hidden layer k1..k4 over x1..x3 of the three-input
// network; with NIN = 4, NOUT = 10 and INIT = Y_INIT the same module is the
// output layer y0..y9. Combinational, no clock.
module bnn_layer
  import bnn_pkg::*;
#(
  parameter int unsigned                     NIN  = NX,
  parameter int unsigned                     NOUT = NK,
  parameter logic [NOUT-1:0][2**NIN-1:0]     INIT = K_INIT
) (
  input  logic [NIN-1:0]  x,
  output logic [NOUT-1:0] y
);

  for (genvar j = 0; j < NOUT; j++) begin : g_neuron
    bnn_neuron #(.NIN(NIN), .INIT(INIT[j])) u_neuron (
      .x (x),
      .y (y[j])
    );
  end

endmodule
