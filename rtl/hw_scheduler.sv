// hw_scheduler: hardware part of the scheduler.
//
// The software scheduler decides which hardware modules are to be activated
// and tells this block through a register on the processor bus; the block
// then gives each selected module its start pulse. It also records which
// modules have been started and which have signalled successful termination
// (their exit pulse), so the software can read the state of the hardware
// side. The document gives only the function (activating hardware modules
// at initialisation on the software's instructions); the register layout,
// the exit record and the bus protocol are this design's choices.
//
// Bus: single-cycle writes (wr, addr, wdata); rdata is combinational and is
// zero for addresses this block does not own, so several bus slaves can be
// ORed. Writing mask M to A_SCHED_START gives a start pulse, one cycle after
// the write, to every module whose bit is set in M and clears its exit bit.
module hw_scheduler #(
  parameter int unsigned N_MOD = 8
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr,
  input  logic [ttl_pkg::BUS_AW-1:0] addr,
  input  logic [ttl_pkg::BUS_DW-1:0] wdata,
  output logic [ttl_pkg::BUS_DW-1:0] rdata,
  output logic [N_MOD-1:0]           mod_start,
  input  logic [N_MOD-1:0]           mod_exit
);
  import ttl_pkg::*;

  logic [N_MOD-1:0] started, exited;
  logic             wr_start;

  assign wr_start = wr && (addr == A_SCHED_START);

  always_ff @(posedge clk) begin
    if (rst) begin
      mod_start <= '0;
      started   <= '0;
      exited    <= '0;
    end else begin
      mod_start <= wr_start ? wdata[N_MOD-1:0] : '0;
      if (wr_start) started <= started | wdata[N_MOD-1:0];
      exited <= (exited & ~(wr_start ? wdata[N_MOD-1:0] : '0)) | mod_exit;
    end
  end

  always_comb begin
    rdata = '0;
    if (addr == A_SCHED_START) rdata[N_MOD-1:0] = started;
    if (addr == A_SCHED_EXIT)  rdata[N_MOD-1:0] = exited;
  end

endmodule
