// ttl_choice_rx: hardware translation of a choice among receive events,
// (g1?v; ...) [] (g2?v; ...) [] ...
//
// In step X the block raises g_rdy on every gate of the choice and waits for
// an acknowledgement. When the transmitter of gate b acknowledges, the block
// raises g_n on gate b only and then loads v_r from gate b's value line, with
// done[b] (out^b) high. If several transmitters acknowledge in the same cycle
// the first branch wins, as in the source method; the others see no g_n and go
// back to waiting, which is exactly why the confirm signal exists. The
// NB-branch generalisation, the start/done protocol and the reset are this
// design's choices.
//
// Interface: start is a one-cycle pulse accepted when idle or in the last
// step; g_rdy, g_ack, g_n, g_v and done are indexed by branch. v_r holds the
// value received from the cycle after done. Timing: three cycles from the
// acknowledge cycle to the value being loaded.
module ttl_choice_rx #(
  parameter int unsigned W  = ttl_pkg::VALUE_W,
  parameter int unsigned NB = 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  output logic [NB-1:0]        done,
  output logic [NB-1:0]        g_rdy,
  input  logic [NB-1:0]        g_ack,
  output logic [NB-1:0]        g_n,
  input  logic [NB-1:0][W-1:0] g_v,
  output logic [W-1:0]         v_r
);

  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;

  typedef enum logic [1:0] {S_IDLE, S_X, S_N, S_LOAD} state_e;
  state_e        state, state_d;
  logic [BW-1:0] sel, sel_d, pick;

  always_comb begin
    pick = '0;
    for (int b = NB - 1; b >= 0; b--)
      if (g_ack[b]) pick = BW'(b);
  end

  always_comb begin
    state_d = state;
    sel_d   = sel;
    unique case (state)
      S_IDLE: if (start) state_d = S_X;
      S_X:    if (|g_ack) begin state_d = S_N; sel_d = pick; end
      S_N:    state_d = S_LOAD;
      S_LOAD: state_d = start ? S_X : S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sel   <= '0;
      v_r   <= '0;
    end else begin
      state <= state_d;
      sel   <= sel_d;
      if (state == S_LOAD) v_r <= g_v[sel];
    end
  end

  always_comb begin
    g_rdy = (state == S_X) ? '1 : '0;
    g_n   = '0;
    done  = '0;
    if (state == S_N)    g_n[sel]  = 1'b1;
    if (state == S_LOAD) done[sel] = 1'b1;
  end

  a_start_legal: assert property (@(posedge clk) disable iff (rst)
    start |-> (state == S_IDLE || state == S_LOAD));

endmodule
