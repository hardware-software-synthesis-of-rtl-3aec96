// ttl_choice_tx: hardware translation of a choice among transmit events,
// (g1!v1; ...) [] (g2!v2; ...) [] ... [] (gNB!vNB; ...).
//
// In step X the block offers every branch at once and waits until, for some
// branch b, all of that gate's receivers are ready (cond(g_b_rdy1, ...)).
// It then runs the transmitter steps of that branch only: ack on gate b,
// check that all of gate b's receivers confirm with g_n (otherwise back to
// X), then drive the branch's value on gate b's g_v while done[b] (out^b)
// is high. Receivers on the other gates see no ack and keep waiting.
// When several branches are ready in the same cycle the source method resolves the
// nondeterminism a priori in favour of the first branch; that is the default
// (ROTATE = 0). ROTATE = 1 is this design's option that starts the search at
// the branch after the one served last, so that no branch can be starved.
// Generalising from two branches to NB and the start/done protocol are this
// design's choices, following the n-way condition given in the source method.
//
// Interface: start is a one-cycle pulse accepted when idle or in the last
// step; g_rdy/g_n are indexed [branch][receiver]; g_ack, g_v, v_t and done
// are indexed by branch. Outputs are Moore. Timing: four cycles from X to the
// last step when a branch is already ready.
module ttl_choice_tx #(
  parameter int unsigned W      = ttl_pkg::VALUE_W,
  parameter int unsigned NB     = 2,
  parameter int unsigned N_RX   = 1,
  parameter bit          ROTATE = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  output logic [NB-1:0]            done,
  input  logic [NB-1:0][N_RX-1:0]  g_rdy,
  output logic [NB-1:0]            g_ack,
  input  logic [NB-1:0][N_RX-1:0]  g_n,
  output logic [NB-1:0][W-1:0]     g_v,
  input  logic [NB-1:0][W-1:0]     v_t
);

  localparam int unsigned BW = (NB > 1) ? $clog2(NB) : 1;

  typedef enum logic [2:0] {S_IDLE, S_X, S_ACK, S_WAITN, S_XFER} state_e;
  state_e        state, state_d;
  logic [BW-1:0] sel, sel_d;     // branch being synchronised
  logic [BW-1:0] last;           // branch served last (ROTATE only)

  logic [NB-1:0] br_rdy;         // cond(...) of each branch
  always_comb
    for (int b = 0; b < NB; b++) br_rdy[b] = &g_rdy[b];

  // Select the first ready branch, starting at branch 0 (a priori choice) or,
  // with ROTATE, at the branch after the last one served.
  logic          any_rdy;
  logic [BW-1:0] pick;
  always_comb begin
    int unsigned first;
    first   = ROTATE ? (int'(last) + 1) % NB : 0;
    any_rdy = |br_rdy;
    pick    = '0;
    for (int k = NB - 1; k >= 0; k--) begin
      int unsigned idx;
      idx = (first + k) % NB;
      if (br_rdy[idx]) pick = BW'(idx);
    end
  end

  always_comb begin
    state_d = state;
    sel_d   = sel;
    unique case (state)
      S_IDLE:  if (start) state_d = S_X;
      S_X:     if (any_rdy) begin state_d = S_ACK; sel_d = pick; end
      S_ACK:   state_d = S_WAITN;
      S_WAITN: state_d = (&g_n[sel]) ? S_XFER : S_X;
      S_XFER:  state_d = start ? S_X : S_IDLE;
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sel   <= '0;
      last  <= BW'(NB - 1);
    end else begin
      state <= state_d;
      sel   <= sel_d;
      if (state == S_XFER) last <= sel;
    end
  end

  always_comb begin
    g_ack = '0;
    done  = '0;
    g_v   = '0;
    if (state == S_ACK)  g_ack[sel] = 1'b1;
    if (state == S_XFER) begin
      done[sel] = 1'b1;
      g_v[sel]  = v_t[sel];
    end
  end

  a_start_legal: assert property (@(posedge clk) disable iff (rst)
    start |-> (state == S_IDLE || state == S_XFER));
  a_one_ack: assert property (@(posedge clk) disable iff (rst) $onehot0(g_ack));

endmodule
