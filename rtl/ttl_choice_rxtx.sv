// ttl_choice_rxtx: hardware translation of a mixed choice g1?v [] g2!v.
//
// In step X the block raises g1_rdy (it can accept on gate g1) and watches
// the receivers of gate g2. An acknowledgement on g1 takes priority: the
// block then confirms with g1_n and loads v_r from g1_v (done[0]). Otherwise,
// once all receivers of g2 are ready, it acknowledges on g2, checks that all
// of them confirm with g2_n (back to X if not) and drives v_t on g2_v
// (done[1]). The branch order and steps follow the source method; the start/done
// protocol, the reset and the width are this design's choices.
//
// Interface: start is a one-cycle pulse accepted when idle or in a last step.
// N_RX receivers may listen on g2 (one-to-many). Outputs are Moore.
module ttl_choice_rxtx #(
  parameter int unsigned W    = ttl_pkg::VALUE_W,
  parameter int unsigned N_RX = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic [1:0]      done,
  // gate g1: this block receives
  output logic            g1_rdy,
  input  logic            g1_ack,
  output logic            g1_n,
  input  logic [W-1:0]    g1_v,
  output logic [W-1:0]    v_r,
  // gate g2: this block transmits
  input  logic [N_RX-1:0] g2_rdy,
  output logic            g2_ack,
  input  logic [N_RX-1:0] g2_n,
  output logic [W-1:0]    g2_v,
  input  logic [W-1:0]    v_t
);

  typedef enum logic [2:0] {S_IDLE, S_X, S_R_N, S_R_LOAD, S_T_ACK, S_T_WAITN, S_T_XFER} state_e;
  state_e state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE:    if (start) state_d = S_X;
      S_X:       if (g1_ack) state_d = S_R_N;
                 else if (&g2_rdy) state_d = S_T_ACK;
      S_R_N:     state_d = S_R_LOAD;
      S_R_LOAD:  state_d = start ? S_X : S_IDLE;
      S_T_ACK:   state_d = S_T_WAITN;
      S_T_WAITN: state_d = (&g2_n) ? S_T_XFER : S_X;
      S_T_XFER:  state_d = start ? S_X : S_IDLE;
      default:   state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      v_r   <= '0;
    end else begin
      state <= state_d;
      if (state == S_R_LOAD) v_r <= g1_v;
    end
  end

  assign g1_rdy  = (state == S_X);
  assign g1_n    = (state == S_R_N);
  assign g2_ack  = (state == S_T_ACK);
  assign g2_v    = (state == S_T_XFER) ? v_t : '0;
  assign done[0] = (state == S_R_LOAD);
  assign done[1] = (state == S_T_XFER);

  a_start_legal: assert property (@(posedge clk) disable iff (rst)
    start |-> (state inside {S_IDLE, S_R_LOAD, S_T_XFER}));

endmodule
