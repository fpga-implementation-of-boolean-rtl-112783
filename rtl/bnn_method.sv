// bnn_method: one separately callable method of the Bnn object, k_i() or
// y_j(), as a small finite state machine with datapath.
//
// The datapath is one Boolean neuron (bnn_neuron) reading the object's
// attributes: a, b, c for a k method, k01..k04 for a y method. The caller
// pulses go for one cycle; the machine leaves IDLE, latches the neuron output
// into the return-value register in EVAL and shows done for one cycle in FIN,
// two cycles after go was sampled. go is ignored while the method runs (busy).
// return_value keeps the last result until the next call. The go/done/
// return-value interface mirrors the mapped method's GO, DONE and
// RETURN_VALUE pins; the three-state schedule is this design's own, the mapped
// methods use between three and seven states. Reset is asynchronous, active
// low, and clears the return value.
module bnn_method
  import bnn_pkg::*;
#(
  parameter int unsigned       NIN  = NX,
  parameter logic [2**NIN-1:0] INIT = K_INIT[3]   // k4()
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           go,
  input  logic [NIN-1:0] operands,
  output logic           busy,
  output logic           done,
  output logic           return_value
);

  typedef enum logic [1:0] {M_IDLE, M_EVAL, M_FIN} mstate_e;

  mstate_e state, state_nxt;
  logic    neuron_y;

  bnn_neuron #(.NIN(NIN), .INIT(INIT)) u_neuron (
    .x (operands),
    .y (neuron_y)
  );

  always_comb begin
    state_nxt = state;
    unique case (state)
      M_IDLE:  if (go) state_nxt = M_EVAL;
      M_EVAL:  state_nxt = M_FIN;
      M_FIN:   state_nxt = M_IDLE;
      default: state_nxt = M_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= M_IDLE;
      return_value <= 1'b0;
    end else begin
      state <= state_nxt;
      if (state == M_EVAL) return_value <= neuron_y;
    end
  end

  assign busy = (state != M_IDLE);
  assign done = (state == M_FIN);

endmodule
