// ttl_rx: hardware translation of the receiver event g?v.
//
// A process accepting a value on gate g runs a three-step control sequence:
//   Y  : raise g_rdy and wait for the transmitter's g_ack
//   Y1 : raise g_n for one cycle to tell the transmitter that the
//        synchronisation has actually occurred
//   Y2 : load the register v_r from g_v; done (out_j) is high in this step
// The steps and signals follow the source method. The IDLE state, the start/done
// pulse protocol, the reset value of v_r (zero) and the width are this
// design's choices.
//
// Interface: start (in_j) is a one-cycle pulse that enters step Y, accepted
// when idle or in step Y2 (a recursive process loops done back to start).
// g_rdy and g_n are decoded from the state. v_r holds the received value from
// the cycle after done until the next rendezvous completes.
module ttl_rx #(
  parameter int unsigned W = ttl_pkg::VALUE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic         done,
  output logic         g_rdy,
  input  logic         g_ack,
  output logic         g_n,
  input  logic [W-1:0] g_v,
  output logic [W-1:0] v_r
);

  typedef enum logic [1:0] {S_IDLE, S_Y, S_Y1, S_Y2} state_e;
  state_e state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE: if (start) state_d = S_Y;
      S_Y:    if (g_ack) state_d = S_Y1;
      S_Y1:   state_d = S_Y2;
      S_Y2:   state_d = start ? S_Y : S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      v_r   <= '0;
    end else begin
      state <= state_d;
      if (state == S_Y2) v_r <= g_v;
    end
  end

  assign g_rdy = (state == S_Y);
  assign g_n   = (state == S_Y1);
  assign done  = (state == S_Y2);

  a_start_legal: assert property (@(posedge clk) disable iff (rst)
    start |-> (state == S_IDLE || state == S_Y2));

endmodule
