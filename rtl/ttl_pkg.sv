// ttl_pkg: shared constants and types for the rendezvous hardware.
//
// Every synchronisation gate carries one value of VALUE_W bits. The example
// processes exchange integers, so the default is a 32-bit word; the width is
// this design's choice. The package also fixes the register map of the small
// processor bus through which the software scheduler reaches the hardware
// scheduler and the hardware/software interface (addresses are word indices).
package ttl_pkg;

  parameter int unsigned VALUE_W = 32;
  typedef logic [VALUE_W-1:0] value_t;

  // Processor bus
  parameter int unsigned BUS_AW = 4;
  parameter int unsigned BUS_DW = 32;

  // Hardware scheduler registers
  parameter logic [BUS_AW-1:0] A_SCHED_START  = 4'h0; // W: start mask, R: started mask
  parameter logic [BUS_AW-1:0] A_SCHED_EXIT   = 4'h1; // R: exited mask

  // Interface, gate where software transmits to hardware receivers
  parameter logic [BUS_AW-1:0] A_SWTX_VALUE  = 4'h2; // W/R: value register driven on g_v
  parameter logic [BUS_AW-1:0] A_SWTX_CTRL   = 4'h3; // W bit0: ack; R: {busy,fail,done,rdy}

  // Interface, gate where a hardware transmitter sends to software
  parameter logic [BUS_AW-1:0] A_HWTX_CTRL   = 4'h4; // W bit0: ready, bit1: clear; R: {acked,ready}
  parameter logic [BUS_AW-1:0] A_HWTX_VALUE  = 4'h5; // R: value captured from g_v

  // Status bit positions
  parameter int unsigned SWTX_RDY  = 0;
  parameter int unsigned SWTX_DONE = 1;
  parameter int unsigned SWTX_FAIL = 2;
  parameter int unsigned SWTX_BUSY = 3;
  parameter int unsigned HWTX_READY = 0;
  parameter int unsigned HWTX_ACKED = 1;

endpackage
