// bnn_pkg: shared constants, types and table functions of the Boolean neural
// network (BNN) of three inputs x1..x3, four hidden neurons k1..k4 and ten
// output neurons y0..y9.
//
// A Boolean neuron is a lookup table. Its contents are given here as an INIT
// vector whose bit n is the neuron's output when its input vector, read as an
// unsigned number, equals n. Bit i of an input vector is input i+1 (x1 is bit 0
// of an x vector, k1 is bit 0 of a k vector, y0 is bit 0 of a y vector).
//
// The hidden truth tables and the output weights are those of the trained
// network of the three-input example; the tables are written here in the row
// order 000..111 of (x1 x2 x3), x1 being the most significant digit, and are
// turned into INIT vectors by a function. The output neurons are disjunctions
// of the k neurons selected by their weights. The register map and the bus
// structs are this design's own.
package bnn_pkg;

  localparam int unsigned NX = 3;   // network inputs x1..x3
  localparam int unsigned NK = 4;   // hidden neurons k1..k4
  localparam int unsigned NY = 10;  // output neurons y0..y9
  localparam int unsigned NM = NK + NY;  // separately callable methods

  typedef logic [NX-1:0] x_vec_t;
  typedef logic [NK-1:0] k_vec_t;
  typedef logic [NY-1:0] y_vec_t;

  // Hidden transfer functions: bit r is k for row r = 4*x1 + 2*x2 + x3.
  //                                               r: 76543210
  localparam logic [7:0] K1_ROWS = 8'b0110_1010;  // 1 at 001 011 101 110
  localparam logic [7:0] K2_ROWS = 8'b0001_0000;  // 1 at 100
  localparam logic [7:0] K3_ROWS = 8'b0000_0011;  // 1 at 000 001
  localparam logic [7:0] K4_ROWS = 8'b1010_0100;  // 1 at 010 101 111

  // Output weights: bit i of W_Yj set means k_(i+1) feeds the disjunction y_j.
  localparam k_vec_t W_Y0 = 4'b0001;  // k1
  localparam k_vec_t W_Y1 = 4'b0011;  // k1 k2
  localparam k_vec_t W_Y2 = 4'b1100;  // k3 k4
  localparam k_vec_t W_Y3 = 4'b0101;  // k1 k3
  localparam k_vec_t W_Y4 = 4'b1010;  // k2 k4
  localparam k_vec_t W_Y5 = 4'b1001;  // k1 k4
  localparam k_vec_t W_Y6 = 4'b0111;  // k1 k2 k3
  localparam k_vec_t W_Y7 = 4'b0110;  // k2 k3
  localparam k_vec_t W_Y8 = 4'b1110;  // k2 k3 k4
  localparam k_vec_t W_Y9 = 4'b1000;  // k4

  localparam logic [NY-1:0][NK-1:0] W_Y = {W_Y9, W_Y8, W_Y7, W_Y6, W_Y5,
                                           W_Y4, W_Y3, W_Y2, W_Y1, W_Y0};

  // Reorders a table given in (x1 x2 x3) row order into an INIT vector
  // indexed by the x vector {x3, x2, x1}.
  function automatic logic [7:0] rows_to_init(input logic [7:0] rows);
    logic [7:0] init;
    for (int n = 0; n < 8; n++) begin
      init[n] = rows[{n[0], n[1], n[2]}];
    end
    return init;
  endfunction

  // INIT vector of a 4-input disjunction neuron with weights w:
  // y = OR over i of (w_i AND k_i).
  function automatic logic [15:0] or_init(input k_vec_t w);
    logic [15:0] init;
    for (int n = 0; n < 16; n++) begin
      init[n] = |(w & k_vec_t'(n));
    end
    return init;
  endfunction

  localparam logic [NK-1:0][7:0] K_INIT = {rows_to_init(K4_ROWS),
                                           rows_to_init(K3_ROWS),
                                           rows_to_init(K2_ROWS),
                                           rows_to_init(K1_ROWS)};

  function automatic logic [NY-1:0][15:0] y_init_all();
    logic [NY-1:0][15:0] t;
    for (int j = 0; j < NY; j++) begin
      t[j] = or_init(W_Y[j]);
    end
    return t;
  endfunction

  localparam logic [NY-1:0][15:0] Y_INIT = y_init_all();

  // Register bus between the host bridge and the register file: one request
  // per cycle; a read answers with rvalid one cycle later.
  localparam int unsigned ADDR_W = 3;
  localparam int unsigned DATA_W = 32;

  typedef struct packed {
    logic              req;    // a transfer this cycle
    logic              we;     // 1: write, 0: read
    logic [ADDR_W-1:0] addr;   // word address
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic              rvalid; // read data valid (one cycle after the read)
    logic [DATA_W-1:0] rdata;
  } bus_rsp_t;

  // Register map (word addresses).
  localparam logic [ADDR_W-1:0] REG_CTRL   = 3'd0; // W: bit0 starts calculate(); R: status
  localparam logic [ADDR_W-1:0] REG_X      = 3'd1; // RW: bits 2:0 = x3 x2 x1
  localparam logic [ADDR_W-1:0] REG_Y      = 3'd2; // R: bits 9:0 = y9..y0
  localparam logic [ADDR_W-1:0] REG_K      = 3'd3; // R: bits 3:0 = k4..k1 (attributes)
  localparam logic [ADDR_W-1:0] REG_METHOD = 3'd4; // W: bits 3:0 = method to call; R: last called

  // Status bits of REG_CTRL.
  localparam int unsigned ST_CALC_BUSY = 0;
  localparam int unsigned ST_CALC_DONE = 1;
  localparam int unsigned ST_CALC_RET  = 2;
  localparam int unsigned ST_METH_BUSY = 8;
  localparam int unsigned ST_METH_DONE = 9;
  localparam int unsigned ST_METH_RET  = 10;
  localparam int unsigned ST_REFUSED   = 16;  // a write was refused because logic was busy

  // Method numbers: 0..3 call k1()..k4(), 4..13 call y0()..y9().
  localparam int unsigned M_K1 = 0;
  localparam int unsigned M_Y0 = NK;

endpackage
