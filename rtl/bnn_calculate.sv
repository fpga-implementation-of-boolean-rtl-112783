// bnn_calculate: the Bnn::calculate() method, the whole network evaluated by
// one invocation, built as a finite state machine with datapath.
//
// The method body is executed one statement per state, in its written order:
// k01 = k1() .. k04 = k4(), then y00 = y0() .. y09 = y9(), then return true,
// with every called method inlined. The datapath is the hidden layer (four
// neurons over the attributes a, b, c) and the output layer (ten disjunction
// neurons over the attribute registers k01..k04), fourteen lookup tables in
// all. The k attributes are kept here; each y result is handed to the register
// file with a one-cycle write strobe y_we[j] and the value y_d[j].
//
// The state vector is one-hot, 16 states: IDLE, K1..K4, Y0..Y9, RET. go is
// sampled in IDLE only. done is high for one cycle in RET, 15 cycles after the
// cycle in which go was sampled (150 ns at 100 MHz, within the 0.2 us the
// mapped method takes); busy is high from the cycle after go until RET.
// The one-statement-per-state schedule is this design's choice; the mapped
// method has 22 states. x must stay stable while busy (the register file
// guarantees it). Asynchronous active-low reset.
module bnn_calculate
  import bnn_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   go,
  input  x_vec_t x,             // attributes a, b, c (bit 0 = a = x1)
  output logic   busy,
  output logic   done,
  output logic   return_value,
  output k_vec_t k_q,           // attributes k01..k04
  output y_vec_t y_we,          // y0j written this cycle
  output y_vec_t y_d            // value to write
);

  localparam int unsigned S_IDLE = 0;
  localparam int unsigned S_K    = 1;             // S_K + i evaluates k(i+1)
  localparam int unsigned S_Y    = S_K + NK;      // S_Y + j evaluates y(j)
  localparam int unsigned S_RET  = S_Y + NY;
  localparam int unsigned NS     = S_RET + 1;

  logic [NS-1:0] state, state_nxt;
  k_vec_t        k_comb;

  bnn_layer #(.NIN(NX), .NOUT(NK), .INIT(K_INIT)) u_hidden (
    .x (x),
    .y (k_comb)
  );

  bnn_layer #(.NIN(NK), .NOUT(NY), .INIT(Y_INIT)) u_output (
    .x (k_q),
    .y (y_d)
  );

  // One-hot sequencer: IDLE waits for go, every other state lasts one cycle
  // and hands over to the next; RET returns to IDLE.
  always_comb begin
    state_nxt = '0;
    if (state[S_IDLE]) begin
      if (go) state_nxt[S_K]    = 1'b1;
      else    state_nxt[S_IDLE] = 1'b1;
    end
    for (int s = S_K; s < S_RET; s++) begin
      if (state[s]) state_nxt[s+1] = 1'b1;
    end
    if (state[S_RET]) state_nxt[S_IDLE] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= NS'(1) << S_IDLE;
      k_q          <= '0;
      return_value <= 1'b0;
    end else begin
      state <= state_nxt;
      for (int i = 0; i < NK; i++) begin
        if (state[S_K+i]) k_q[i] <= k_comb[i];
      end
      if (state[S_K]) return_value <= 1'b0;
      if (state[S_RET-1]) return_value <= 1'b1;   // valid with done
    end
  end

  assign y_we = state[S_Y +: NY];
  assign busy = !state[S_IDLE];
  assign done = state[S_RET];

  // The state vector stays one-hot.
  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(state));

endmodule
