// ttl_tx: hardware translation of the transmitter event g!v.
//
// A process offering value v on gate g takes part in a rendezvous with one
// or more receivers. The block is a four-step control sequence:
//   X  : wait until every receiver raises g_rdy
//   X1 : raise g_ack for one cycle (the synchronisation is acknowledged)
//   X2 : if every receiver answers with g_n the rendezvous has happened,
//        otherwise go back to X (a receiver inside a choice went elsewhere)
//   X3 : drive v on g_v for one cycle; done (out_i) is high in this step
// With N_RX > 1 the ready and confirm conditions are the AND over all
// receivers (one-to-many synchronisation). The step sequence and the use of
// the three gate signals follow the source method; the IDLE state, the start/done
// pulse protocol, the reset and the value width are this design's choices.
//
// Interface: start (in_i) is a one-cycle pulse that enters step X, accepted
// when idle or in the last step (so done can be looped back to start for a
// recursive process). All outputs are decoded from the state (Moore), so
// blocks can be connected to each other without combinational loops.
// Timing: with a receiver already waiting, X..X3 take four cycles.
module ttl_tx #(
  parameter int unsigned W    = ttl_pkg::VALUE_W,
  parameter int unsigned N_RX = 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            start,
  output logic            done,
  input  logic [N_RX-1:0] g_rdy,
  output logic            g_ack,
  input  logic [N_RX-1:0] g_n,
  output logic [W-1:0]    g_v,
  input  logic [W-1:0]    v_t
);

  typedef enum logic [2:0] {S_IDLE, S_X, S_X1, S_X2, S_X3} state_e;
  state_e state, state_d;

  logic all_rdy, all_n;
  assign all_rdy = &g_rdy;   // cond(g_rdy1, ..., g_rdyn)
  assign all_n   = &g_n;

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE: if (start) state_d = S_X;
      S_X:    if (all_rdy) state_d = S_X1;
      S_X1:   state_d = S_X2;
      S_X2:   state_d = all_n ? S_X3 : S_X;
      S_X3:   state_d = start ? S_X : S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= state_d;
  end

  assign g_ack = (state == S_X1);
  assign g_v   = (state == S_X3) ? v_t : '0;
  assign done  = (state == S_X3);

  // A start pulse may only arrive while the block is not in the middle of a rendezvous.
  a_start_legal: assert property (@(posedge clk) disable iff (rst)
    start |-> (state == S_IDLE || state == S_X3));

endmodule
