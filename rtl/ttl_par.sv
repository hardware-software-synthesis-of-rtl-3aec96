// ttl_par: parallel composition P1 || P2 || ... || PN of hardware processes.
//
// The start of the composition is broadcast to the start input of every
// process, and the composition terminates when every process has terminated.
// Because processes finish in different cycles, the block remembers which
// exit pulses it has seen since the last start and emits the end pulse in
// the cycle in which the last missing exit arrives; it then re-arms. The
// fan-out of start and the joining of the exits follow the source method; storing
// the exits so that they need not coincide is this design's choice.
//
// Interface: start is a one-cycle pulse; p_start[i] is start copied to every
// process; p_exit[i] are one-cycle pulses; end_o is a one-cycle pulse. A start
// clears the exits seen so far.
module ttl_par #(
  parameter int unsigned N = 3
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  output logic [N-1:0] p_start,
  input  logic [N-1:0] p_exit,
  output logic         end_o
);

  logic [N-1:0] seen;

  assign p_start = {N{start}};
  assign end_o   = &(seen | p_exit);

  always_ff @(posedge clk) begin
    if (rst || start || end_o) seen <= '0;
    else                       seen <= seen | p_exit;
  end

endmodule
