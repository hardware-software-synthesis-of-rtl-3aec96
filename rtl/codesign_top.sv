// codesign_top: hardware side of a synthesised hardware/software system.
//
// A processor runs the software modules and the software scheduler, which
// polls events rather than tasks. It reaches the hardware through a small
// register bus (ttl_pkg holds the map) with two slaves:
//   hw_scheduler   - starts the hardware modules on the software's command:
//                    bit 0 the example process P, bit 1 the echo process E,
//                    bits 2..4 R, T1, T2 of the receive-choice system,
//                    bits 5..7 TR, T, R of the mixed-choice system
//   hwsw_interface - gate gA, on which software transmits to hardware, and
//                    gate gB, on which hardware transmits to software
// Hardware module 0 is ttl_example_p, a closed process whose gates are all
// internal; its values v1, v2 and its registers x, y, z are brought out.
// ttl_case2_system and ttl_case3_system are the two other choice examples;
// their transmitters send v1 and v2 and their registers are brought out.
// Hardware module 1 is E := gA?a; gB!a; E, a receiver followed by a
// transmitter in a loop: it takes a word from software over gA and returns
// it over gB. Rendezvous among hardware blocks use the ready/ack/confirm
// signals directly; those involving software go through the interface.
// The overall organisation (scheduler in two parts, interface, hardware
// modules) follows the source method; the echo process, the register map and the
// bus are this design's choices, made so that both directions of the
// interface have a hardware partner.
//
// Bus: single-cycle writes (bus_wr, bus_addr, bus_wdata); bus_rdata is
// combinational on bus_addr.
module codesign_top (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       bus_wr,
  input  logic [ttl_pkg::BUS_AW-1:0] bus_addr,
  input  logic [ttl_pkg::BUS_DW-1:0] bus_wdata,
  output logic [ttl_pkg::BUS_DW-1:0] bus_rdata,
  input  ttl_pkg::value_t            v1,
  input  ttl_pkg::value_t            v2,
  output ttl_pkg::value_t            x,
  output ttl_pkg::value_t            y,
  output ttl_pkg::value_t            z,
  output logic                       p_exit,
  output ttl_pkg::value_t            c2_v,
  output ttl_pkg::value_t            c3_u,
  output ttl_pkg::value_t            c3_y
);
  import ttl_pkg::*;

  logic [BUS_DW-1:0] rd_sched, rd_if;
  logic [7:0]        mod_start, mod_exit;

  hw_scheduler #(.N_MOD(8)) u_sched (
    .clk, .rst, .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .rdata(rd_sched),
    .mod_start, .mod_exit
  );

  // gate gA (software -> E) and gate gB (E -> software)
  logic   ga_rdy, ga_ack, ga_n, gb_rdy, gb_ack, gb_n;
  value_t ga_v, gb_v;

  hwsw_interface #(.W(VALUE_W), .N_RX(1)) u_if (
    .clk, .rst, .wr(bus_wr), .addr(bus_addr), .wdata(bus_wdata), .rdata(rd_if),
    .swtx_rdy(ga_rdy), .swtx_ack(ga_ack), .swtx_n(ga_n), .swtx_v(ga_v),
    .hwtx_rdy(gb_rdy), .hwtx_ack(gb_ack), .hwtx_n(gb_n), .hwtx_v(gb_v)
  );

  assign bus_rdata = rd_sched | rd_if;

  // hardware module 0: the example process P
  ttl_example_p #(.W(VALUE_W)) u_p (
    .clk, .rst, .p_start(mod_start[0]), .p_exit, .v1, .v2, .x, .y, .z
  );

  // hardware module 1: E := gA?a; gB!a; E
  logic   e_rx_done, e_tx_done;
  value_t e_a;
  ttl_rx #(.W(VALUE_W)) u_e_rx (
    .clk, .rst, .start(mod_start[1] | e_tx_done), .done(e_rx_done),
    .g_rdy(ga_rdy), .g_ack(ga_ack), .g_n(ga_n), .g_v(ga_v), .v_r(e_a)
  );
  ttl_tx #(.W(VALUE_W), .N_RX(1)) u_e_tx (
    .clk, .rst, .start(e_rx_done), .done(e_tx_done),
    .g_rdy(gb_rdy), .g_ack(gb_ack), .g_n(gb_n), .g_v(gb_v), .v_t(e_a)
  );

  // receive-choice system (modules 2..4) and mixed-choice system (5..7)
  ttl_case2_system #(.W(VALUE_W)) u_c2 (
    .clk, .rst, .start(mod_start[4:2]), .exit_o(mod_exit[4:2]), .a(v1), .b(v2), .v(c2_v)
  );
  ttl_case3_system #(.W(VALUE_W)) u_c3 (
    .clk, .rst, .start(mod_start[7:5]), .exit_o(mod_exit[7:5]), .a(v1), .w(v2), .u(c3_u), .y(c3_y)
  );

  assign mod_exit[1:0] = {1'b0, p_exit};  // E is recursive and never exits

endmodule
