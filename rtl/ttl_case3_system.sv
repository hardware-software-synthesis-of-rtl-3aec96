// ttl_case3_system: hardware for a process whose choice mixes a receive and
// a transmit,
//
//   TR := g1?u; TR [] g2!w; TR     (recursive mixed choice)
//   T  := g1!a; exit               R := g2?y; exit
//
// TR offers to receive on g1 and, at the same time, watches R on g2. If R is
// ready before T's acknowledgement arrives, TR commits to the transmit branch
// and drops g1_rdy; T's acknowledgement then goes unconfirmed and T returns
// to waiting until TR comes back to its choice. The process shapes come from
// the source method's Case 3 (given there only as fragments); making TR
// recursive and T, R single-shot is this design's choice.
//
// Interface: start[0..2] start TR, T, R (one-cycle pulses); exit_o[1],
// exit_o[2] pulse when T and R have finished; exit_o[0] stays low (TR is
// recursive). u is TR's register, y is R's register.
module ttl_case3_system #(
  parameter int unsigned W = ttl_pkg::VALUE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   start,
  output logic [2:0]   exit_o,
  input  logic [W-1:0] a,
  input  logic [W-1:0] w,
  output logic [W-1:0] u,
  output logic [W-1:0] y
);

  logic         g1_rdy, g1_ack, g1_n, g2_rdy, g2_ack, g2_n;
  logic [W-1:0] g1_v, g2_v;
  logic [1:0]   tr_done;

  ttl_choice_rxtx #(.W(W), .N_RX(1)) u_tr (
    .clk, .rst, .start(start[0] | (|tr_done)), .done(tr_done),
    .g1_rdy, .g1_ack, .g1_n, .g1_v, .v_r(u),
    .g2_rdy, .g2_ack, .g2_n, .g2_v, .v_t(w)
  );
  ttl_tx #(.W(W), .N_RX(1)) u_t (
    .clk, .rst, .start(start[1]), .done(exit_o[1]),
    .g_rdy(g1_rdy), .g_ack(g1_ack), .g_n(g1_n), .g_v(g1_v), .v_t(a)
  );
  ttl_rx #(.W(W)) u_r (
    .clk, .rst, .start(start[2]), .done(exit_o[2]),
    .g_rdy(g2_rdy), .g_ack(g2_ack), .g_n(g2_n), .g_v(g2_v), .v_r(y)
  );
  assign exit_o[0] = 1'b0;  // TR is recursive

endmodule
