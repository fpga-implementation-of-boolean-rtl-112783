// bnn_neuron: one Boolean neuron y = f_B(x, w) with all signals in {0,1}.
//
// A Boolean neuron with at most four inputs has the same structure as a
// four-input FPGA lookup table, so it is built as one: the transfer function
// and the weights together are folded into the INIT vector, and the output is
// the INIT bit addressed by the input vector. Bit i of x is input i+1; bit n
// of INIT is the output for x == n. NIN may be raised to 5 or 6 for neurons
// that fill a slice or a whole logic block. Purely combinational, no clock.
// The default INIT is the disjunction of all four inputs, the transfer
// function the output layer uses.
module bnn_neuron #(
  parameter int unsigned         NIN  = 4,
  parameter logic [2**NIN-1:0]   INIT = {{(2**NIN-1){1'b1}}, 1'b0}
) (
  input  logic [NIN-1:0] x,
  output logic           y
);

  assign y = INIT[x];

endmodule
