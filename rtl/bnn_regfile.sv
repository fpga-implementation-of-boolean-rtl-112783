// bnn_regfile: register file of the Bnn object, the user logic's window to
// the host.
//
// It stores the input attributes a, b, c (register X, written by the host:
// the hardware side of init_x()) and the output attributes y00..y09 (register
// Y, written by calculate(), read by the host: get_y()), starts calculate()
// and the separately callable methods, and reports their progress so that the
// host can synchronise with the user logic by polling.
//
// Bus: one request per cycle on bus_i; a write takes effect at the clock edge,
// a read answers with bus_o.rvalid and bus_o.rdata one cycle later. Register
// map (word addresses, see bnn_pkg):
//   0 CTRL   W bit0 = 1 starts calculate()
//            R status: bit0 calculate busy, bit1 calculate done (sticky until
//              the next start), bit2 its return value, bit8 method busy,
//              bit9 method done (sticky), bit10 method return value,
//              bit16 a write was refused (sticky, cleared by reading CTRL)
//   1 X      RW bits 2:0 = x3 x2 x1
//   2 Y      R  bits 9:0 = y9..y0
//   3 K      R  bits 3:0 = k4..k1
//   4 METHOD W  bits 3:0 = method to call (0..3 = k1..k4, 4..13 = y0..y9)
//            R  bits 3:0 = last method called
// Starts are issued one cycle after the write as a one-cycle go pulse. While
// calculate() or a method runs or is about to start, writes to X and further
// starts are refused and flagged, so that the inputs of the running logic stay
// stable and only one piece of user logic runs at a time. The map, the bus
// and this rule are this design's own. Asynchronous active-low reset clears
// every register.
module bnn_regfile
  import bnn_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  bus_req_t        bus_i,
  output bus_rsp_t        bus_o,
  // calculate()
  output logic            calc_go,
  input  logic            calc_busy,
  input  logic            calc_done,
  input  logic            calc_ret,
  input  k_vec_t          k_attr,
  input  y_vec_t          y_we,
  input  y_vec_t          y_d,
  output x_vec_t          x_q,
  // separately callable methods
  output logic [NM-1:0]   meth_go,
  input  logic [NM-1:0]   meth_busy,
  input  logic [NM-1:0]   meth_done,
  input  logic [NM-1:0]   meth_ret
);

  y_vec_t       y_q;
  logic         calc_done_q;
  logic         meth_done_q;
  logic [3:0]   meth_idx_q;
  logic         refused_q;
  logic         active;
  logic         wr, rd;
  logic         wr_ctrl, wr_x, wr_meth;
  logic         start_calc, start_meth;
  logic [DATA_W-1:0] status, rdata_nxt;

  assign wr = bus_i.req &&  bus_i.we;
  assign rd = bus_i.req && !bus_i.we;

  // Something runs or is about to start.
  assign active = calc_busy || calc_go || (|meth_busy) || (|meth_go);

  assign wr_ctrl = wr && bus_i.addr == REG_CTRL && bus_i.wdata[0];
  assign wr_x    = wr && bus_i.addr == REG_X;
  assign wr_meth = wr && bus_i.addr == REG_METHOD && bus_i.wdata[3:0] < 4'(NM);

  assign start_calc = wr_ctrl && !active;
  assign start_meth = wr_meth && !active;

  always_comb begin
    status = '0;
    status[ST_CALC_BUSY] = calc_busy || calc_go;
    status[ST_CALC_DONE] = calc_done_q;
    status[ST_CALC_RET]  = calc_ret;
    status[ST_METH_BUSY] = (|meth_busy) || (|meth_go);
    status[ST_METH_DONE] = meth_done_q;
    status[ST_METH_RET]  = meth_ret[meth_idx_q];
    status[ST_REFUSED]   = refused_q;
  end

  always_comb begin
    rdata_nxt = '0;
    unique case (bus_i.addr)
      REG_CTRL:   rdata_nxt = status;
      REG_X:      rdata_nxt[NX-1:0] = x_q;
      REG_Y:      rdata_nxt[NY-1:0] = y_q;
      REG_K:      rdata_nxt[NK-1:0] = k_attr;
      REG_METHOD: rdata_nxt[3:0]    = meth_idx_q;
      default:    rdata_nxt = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q         <= '0;
      y_q         <= '0;
      calc_go     <= 1'b0;
      calc_done_q <= 1'b0;
      meth_go     <= '0;
      meth_done_q <= 1'b0;
      meth_idx_q  <= '0;
      refused_q   <= 1'b0;
      bus_o       <= '0;
    end else begin
      // Start pulses last one cycle.
      calc_go <= start_calc;
      meth_go <= '0;
      if (start_meth) begin
        meth_go[bus_i.wdata[3:0]] <= 1'b1;
        meth_idx_q                <= bus_i.wdata[3:0];
      end

      if (wr_x && !active) x_q <= bus_i.wdata[NX-1:0];

      // Refused writes are remembered until the host reads the status.
      if (rd && bus_i.addr == REG_CTRL) refused_q <= 1'b0;
      if ((wr_x || wr_ctrl || wr_meth) && active) refused_q <= 1'b1;

      if (start_calc)     calc_done_q <= 1'b0;
      else if (calc_done) calc_done_q <= 1'b1;
      if (start_meth)     meth_done_q <= 1'b0;
      else if (|meth_done) meth_done_q <= 1'b1;

      for (int j = 0; j < NY; j++) begin
        if (y_we[j]) y_q[j] <= y_d[j];
      end

      bus_o.rvalid <= rd;
      if (rd) bus_o.rdata <= rdata_nxt;
    end
  end

  // Only one piece of user logic runs at a time.
  a_one_runs: assert property (@(posedge clk) disable iff (!rst_n)
                               !(calc_busy && (|meth_busy)));
  // A read is answered exactly one cycle later.
  a_rvalid:   assert property (@(posedge clk) disable iff (!rst_n)
                               rd |=> bus_o.rvalid);

endmodule
