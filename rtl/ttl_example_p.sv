// ttl_example_p: hardware synthesised from the example specification
//
//   P  := P1 || P2 || P3
//   P1 := g1!v1; P1 [] g2!v2; P1
//   P2 := g1?x:integer; P2
//   P3 := P4 >> P5,   P4 := g2?y:integer; exit,   P5 := g2?z:integer; P5
//
// P1 is a two-way transmit choice, P2, P4 and P5 are receiver blocks. The
// recursive processes feed their done pulses back into their own start, so
// they run forever. P4's done is the exit of P4 and, through the enabling
// operator, the start of P5. P4 and P5 share gate g2: they are never active
// at the same time, so their ready and confirm lines are ORed onto the gate.
// P_start is broadcast through the parallel composition; P_exit is the join
// of the three exits, which stays low because all three processes are
// recursive and never exit.
//
// The structure follows the source method's example. FAIR_CHOICE is this design's
// addition: P2 is ready again in the very cycle P1 comes back to its choice,
// so with the source method's a-priori choice of the first branch (FAIR_CHOICE = 0)
// gate g2 is never served and y, z stay at zero. The default (1) alternates
// between the branches when both are ready.
//
// Interface: p_start is a one-cycle pulse; v1 and v2 are the values P1
// offers; x, y, z are the registers of P2, P4 and P5.
module ttl_example_p #(
  parameter int unsigned W           = ttl_pkg::VALUE_W,
  parameter bit          FAIR_CHOICE = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         p_start,
  output logic         p_exit,
  input  logic [W-1:0] v1,
  input  logic [W-1:0] v2,
  output logic [W-1:0] x,
  output logic [W-1:0] y,
  output logic [W-1:0] z
);

  // parallel composition P1 || P2 || P3
  logic [2:0] start_i, exit_i;
  ttl_par #(.N(3)) u_par (
    .clk, .rst, .start(p_start), .p_start(start_i), .p_exit(exit_i), .end_o(p_exit)
  );
  assign exit_i = 3'b000;  // P1, P2 and P3 (through P5) are recursive

  // gate g1: P1 -> P2; gate g2: P1 -> P4 / P5
  logic         g1_rdy, g1_ack, g1_n;
  logic         g2_rdy, g2_ack, g2_n;
  logic [W-1:0] g1_v, g2_v;

  // P1
  logic [1:0] p1_done;
  ttl_choice_tx #(.W(W), .NB(2), .N_RX(1), .ROTATE(FAIR_CHOICE)) u_p1 (
    .clk, .rst,
    .start (start_i[0] | (|p1_done)),
    .done  (p1_done),
    .g_rdy ({g2_rdy, g1_rdy}),
    .g_ack ({g2_ack, g1_ack}),
    .g_n   ({g2_n, g1_n}),
    .g_v   ({g2_v, g1_v}),
    .v_t   ({v2, v1})
  );

  // P2
  logic p2_done;
  ttl_rx #(.W(W)) u_p2 (
    .clk, .rst, .start(start_i[1] | p2_done), .done(p2_done),
    .g_rdy(g1_rdy), .g_ack(g1_ack), .g_n(g1_n), .g_v(g1_v), .v_r(x)
  );

  // P3 := P4 >> P5
  logic p4_exit, p5_done;
  logic p4_rdy, p4_n, p5_rdy, p5_n;
  ttl_rx #(.W(W)) u_p4 (
    .clk, .rst, .start(start_i[2]), .done(p4_exit),
    .g_rdy(p4_rdy), .g_ack(g2_ack), .g_n(p4_n), .g_v(g2_v), .v_r(y)
  );
  ttl_rx #(.W(W)) u_p5 (
    .clk, .rst, .start(p4_exit | p5_done), .done(p5_done),
    .g_rdy(p5_rdy), .g_ack(g2_ack), .g_n(p5_n), .g_v(g2_v), .v_r(z)
  );
  assign g2_rdy = p4_rdy | p5_rdy;
  assign g2_n   = p4_n | p5_n;

endmodule
