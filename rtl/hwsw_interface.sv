// hwsw_interface: lets the software scheduler take part in rendezvous with
// hardware modules, in both directions, through registers on the processor
// bus.
//
// Software transmits, hardware receives (scheduler procedure CASE1):
//   The software writes the value into A_SWTX_VALUE; that register drives
//   the gate's value line permanently, so the hardware receivers read the
//   value from a register initialised by the software. The receivers' g_rdy
//   lines are visible as status bit RDY: a hardware receiver thus notifies
//   the scheduler of its availability. When the scheduler decides to
//   synchronise it writes ACK; the interface raises g_ack for one cycle and
//   in the next cycle checks that all receivers answered with g_n. Status
//   DONE (all confirmed) or FAIL (some receiver had left, e.g. inside a
//   choice) reports the result; BUSY is high meanwhile.
//
// Hardware transmits, software receives (scheduler procedure CASE2):
//   The scheduler writes READY; the interface raises g_rdy towards the
//   hardware transmitter. When the transmitter acknowledges, the ack is
//   recorded in status bit ACKED, the interface confirms with g_n for one
//   cycle and then copies g_v into the external register A_HWTX_VALUE.
//   ACKED stays set until the software writes CLEAR; writing CLEAR while
//   still waiting withdraws the offer (the transmitter is retried later).
//
// The two procedures and the register/ack roles follow the source method; the
// register map (ttl_pkg), the status bits and the bus protocol are this
// design's choices. Bus: single-cycle writes, combinational rdata that is
// zero for addresses not owned here.
module hwsw_interface #(
  parameter int unsigned W    = ttl_pkg::VALUE_W,
  parameter int unsigned N_RX = 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       wr,
  input  logic [ttl_pkg::BUS_AW-1:0] addr,
  input  logic [ttl_pkg::BUS_DW-1:0] wdata,
  output logic [ttl_pkg::BUS_DW-1:0] rdata,
  // gate on which software transmits to N_RX hardware receivers
  input  logic [N_RX-1:0]            swtx_rdy,
  output logic                       swtx_ack,
  input  logic [N_RX-1:0]            swtx_n,
  output logic [W-1:0]               swtx_v,
  // gate on which a hardware transmitter sends to software
  output logic                       hwtx_rdy,
  input  logic                       hwtx_ack,
  output logic                       hwtx_n,
  input  logic [W-1:0]               hwtx_v
);
  import ttl_pkg::*;

  // ---------------- software -> hardware ----------------
  typedef enum logic [1:0] {T_IDLE, T_ACK, T_WAITN} swtx_e;
  swtx_e        ts;
  logic [W-1:0] swtx_value;
  logic         swtx_done, swtx_fail;

  always_ff @(posedge clk) begin
    if (rst) begin
      ts         <= T_IDLE;
      swtx_value <= '0;
      swtx_done  <= 1'b0;
      swtx_fail  <= 1'b0;
    end else begin
      if (wr && addr == A_SWTX_VALUE) swtx_value <= wdata[W-1:0];
      unique case (ts)
        T_IDLE: if (wr && addr == A_SWTX_CTRL && wdata[0]) begin
          ts        <= T_ACK;
          swtx_done <= 1'b0;
          swtx_fail <= 1'b0;
        end
        T_ACK:   ts <= T_WAITN;
        T_WAITN: begin
          ts <= T_IDLE;
          if (&swtx_n) swtx_done <= 1'b1;
          else         swtx_fail <= 1'b1;
        end
        default: ts <= T_IDLE;
      endcase
    end
  end

  assign swtx_ack = (ts == T_ACK);
  assign swtx_v   = swtx_value;

  // ---------------- hardware -> software ----------------
  typedef enum logic [1:0] {H_IDLE, H_WAIT, H_N, H_LOAD} hwtx_e;
  hwtx_e        hs;
  logic [W-1:0] hwtx_value;
  logic         hwtx_acked;
  logic         wr_hctrl;

  assign wr_hctrl = wr && (addr == A_HWTX_CTRL);

  always_ff @(posedge clk) begin
    if (rst) begin
      hs         <= H_IDLE;
      hwtx_value <= '0;
      hwtx_acked <= 1'b0;
    end else begin
      if (wr_hctrl && wdata[1]) hwtx_acked <= 1'b0;
      unique case (hs)
        H_IDLE: if (wr_hctrl && wdata[0]) hs <= H_WAIT;
        H_WAIT: if (hwtx_ack) begin
          hs         <= H_N;
          hwtx_acked <= 1'b1;
        end else if (wr_hctrl && wdata[1]) hs <= H_IDLE;
        H_N:    hs <= H_LOAD;
        H_LOAD: begin
          hs         <= H_IDLE;
          hwtx_value <= hwtx_v;
        end
        default: hs <= H_IDLE;
      endcase
    end
  end

  assign hwtx_rdy = (hs == H_WAIT);
  assign hwtx_n   = (hs == H_N);

  // ---------------- bus read ----------------
  always_comb begin
    rdata = '0;
    unique case (addr)
      A_SWTX_VALUE: rdata[W-1:0] = swtx_value;
      A_SWTX_CTRL: begin
        rdata[SWTX_RDY]  = &swtx_rdy;
        rdata[SWTX_DONE] = swtx_done;
        rdata[SWTX_FAIL] = swtx_fail;
        rdata[SWTX_BUSY] = (ts != T_IDLE);
      end
      A_HWTX_CTRL: begin
        rdata[HWTX_READY] = (hs == H_WAIT);
        rdata[HWTX_ACKED] = hwtx_acked && (hs == H_IDLE);
      end
      A_HWTX_VALUE: rdata[W-1:0] = hwtx_value;
      default: ;
    endcase
  end

endmodule
