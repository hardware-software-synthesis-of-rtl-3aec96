// ttl_case2_system: hardware for a receiver that chooses between two
// transmitters,
//
//   R  := g1?v; R [] g2?v; R      (recursive receive choice)
//   T1 := g1!a; exit              T2 := g2!b; exit
//
// R waits on both gates at once; whichever transmitter acknowledges is
// confirmed with g_n and its value lands in v. When T1 and T2 acknowledge in
// the same cycle R takes g1, and T2, which gets no confirmation, goes back to
// waiting and is served on R's next round. The process shapes come from the
// source method's Case 2 (where only the fragments around the choice are
// given); making R recursive and T1, T2 single-shot, so that each can be
// started on its own, is this design's choice.
//
// Interface: start[0..2] start R, T1, T2 (one-cycle pulses, e.g. from the
// hardware scheduler); exit_o[1], exit_o[2] pulse when T1, T2 have sent
// their value; exit_o[0] stays low because R is recursive. v is R's register.
module ttl_case2_system #(
  parameter int unsigned W = ttl_pkg::VALUE_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [2:0]   start,
  output logic [2:0]   exit_o,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] v
);

  logic [1:0]        g_rdy, g_ack, g_n, r_done;
  logic [1:0][W-1:0] g_v;

  ttl_choice_rx #(.W(W), .NB(2)) u_r (
    .clk, .rst, .start(start[0] | (|r_done)), .done(r_done),
    .g_rdy, .g_ack, .g_n, .g_v, .v_r(v)
  );
  ttl_tx #(.W(W), .N_RX(1)) u_t1 (
    .clk, .rst, .start(start[1]), .done(exit_o[1]),
    .g_rdy(g_rdy[0]), .g_ack(g_ack[0]), .g_n(g_n[0]), .g_v(g_v[0]), .v_t(a)
  );
  ttl_tx #(.W(W), .N_RX(1)) u_t2 (
    .clk, .rst, .start(start[2]), .done(exit_o[2]),
    .g_rdy(g_rdy[1]), .g_ack(g_ack[1]), .g_n(g_n[1]), .g_v(g_v[1]), .v_t(b)
  );
  assign exit_o[0] = 1'b0;  // R is recursive

endmodule
