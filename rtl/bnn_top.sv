// bnn_top: the hardware half of the Bnn object of the three-input Boolean
// neural network, as it sits in the FPGA behind the host bridge.
//
// It holds the register file (bnn_regfile), the calculate() method that
// evaluates the whole network in one call (bnn_calculate) and the fourteen
// separately callable methods k1()..k4() and y0()..y9() (bnn_method), each
// with its own Boolean neuron. The k methods read the input attributes a, b, c
// from the register file; the y methods read the attributes k01..k04 that the
// last calculate() left. The host reaches all of it through the register bus
// bus_i/bus_o (see bnn_regfile for the map and the timing); the bridge from
// the physical host link (a PCI bus, for instance) to this bus is outside this
// module. One clock, asynchronous active-low reset.
module bnn_top
  import bnn_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t bus_i,
  output bus_rsp_t bus_o
);

  logic          calc_go, calc_busy, calc_done, calc_ret;
  k_vec_t        k_attr;
  y_vec_t        y_we, y_d;
  x_vec_t        x_q;
  logic [NM-1:0] meth_go, meth_busy, meth_done, meth_ret;

  bnn_regfile u_regfile (
    .clk       (clk),
    .rst_n     (rst_n),
    .bus_i     (bus_i),
    .bus_o     (bus_o),
    .calc_go   (calc_go),
    .calc_busy (calc_busy),
    .calc_done (calc_done),
    .calc_ret  (calc_ret),
    .k_attr    (k_attr),
    .y_we      (y_we),
    .y_d       (y_d),
    .x_q       (x_q),
    .meth_go   (meth_go),
    .meth_busy (meth_busy),
    .meth_done (meth_done),
    .meth_ret  (meth_ret)
  );

  bnn_calculate u_calculate (
    .clk          (clk),
    .rst_n        (rst_n),
    .go           (calc_go),
    .x            (x_q),
    .busy         (calc_busy),
    .done         (calc_done),
    .return_value (calc_ret),
    .k_q          (k_attr),
    .y_we         (y_we),
    .y_d          (y_d)
  );

  for (genvar i = 0; i < NK; i++) begin : g_kmeth
    bnn_method #(.NIN(NX), .INIT(K_INIT[i])) u_method (
      .clk          (clk),
      .rst_n        (rst_n),
      .go           (meth_go[M_K1+i]),
      .operands     (x_q),
      .busy         (meth_busy[M_K1+i]),
      .done         (meth_done[M_K1+i]),
      .return_value (meth_ret[M_K1+i])
    );
  end

  for (genvar j = 0; j < NY; j++) begin : g_ymeth
    bnn_method #(.NIN(NK), .INIT(Y_INIT[j])) u_method (
      .clk          (clk),
      .rst_n        (rst_n),
      .go           (meth_go[M_Y0+j]),
      .operands     (k_attr),
      .busy         (meth_busy[M_Y0+j]),
      .done         (meth_done[M_Y0+j]),
      .return_value (meth_ret[M_Y0+j])
    );
  end

endmodule
