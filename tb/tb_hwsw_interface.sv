// tb_hwsw_interface: self-checking test of the hardware/software interface.
// The testbench plays the software scheduler on the bus and models the
// hardware partners on both gates. Checked, for software transmitting:
// receiver readiness visible in RDY, the value register driving the gate,
// one ack cycle after the ACK command, DONE when the receiver confirms and
// FAIL when it does not. For hardware transmitting: ready raised on the READY
// command, confirm one cycle after the transmitter's ack, the value captured
// from the line in the following cycle, ACKED until CLEAR, and withdrawal of
// an offer by CLEAR.
module tb_hwsw_interface;
  import ttl_pkg::*;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, wr = 1'b0;
  logic [BUS_AW-1:0] addr = '0;
  logic [BUS_DW-1:0] wdata = '0, rdata;
  logic [0:0] swtx_rdy = '0, swtx_n = '0;
  logic swtx_ack, hwtx_rdy, hwtx_ack = 1'b0, hwtx_n;
  logic [W-1:0] swtx_v, hwtx_v = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hwsw_interface #(.W(W), .N_RX(1)) dut (.*);

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic bus_write(input logic [BUS_AW-1:0] a, input logic [BUS_DW-1:0] d);
    wr = 1'b1; addr = a; wdata = d;
    tick();
    wr = 1'b0;
  endtask
  logic [BUS_DW-1:0] rd0, rd1;
  task automatic bus_read(input logic [BUS_AW-1:0] a, output logic [BUS_DW-1:0] d);
    addr = a;
    #1 d = rdata;
  endtask

  task automatic sw_send(input logic [W-1:0] val, input logic confirm);
    logic [BUS_DW-1:0] st;
    swtx_rdy = 1'b1;
    bus_read(A_SWTX_CTRL, st);
    check(st[SWTX_RDY] == 1'b1, "receiver readiness visible");
    bus_write(A_SWTX_VALUE, val);
    bus_read(A_SWTX_VALUE, rd0);
    check(swtx_v == val && rd0 == val, "value register drives the gate");
    bus_write(A_SWTX_CTRL, 32'h1);
    check(swtx_ack == 1'b1, "ack one cycle after the command");
    bus_read(A_SWTX_CTRL, st);
    check(st[SWTX_BUSY] == 1'b1, "busy during the rendezvous");
    swtx_rdy = 1'b0;
    tick();
    check(swtx_ack == 1'b0, "ack lasts one cycle");
    swtx_n = confirm;
    tick();
    swtx_n = 1'b0;
    bus_read(A_SWTX_CTRL, st);
    check(st[SWTX_BUSY] == 1'b0 && st[SWTX_DONE] == confirm && st[SWTX_FAIL] == !confirm,
          confirm ? "DONE after confirm" : "FAIL without confirm");
    check(swtx_v == val, "value still on the line while the receiver loads it");
  endtask

  task automatic hw_send(input logic [W-1:0] val, input int delay);
    logic [BUS_DW-1:0] st;
    bus_write(A_HWTX_CTRL, 32'h1);
    check(hwtx_rdy == 1'b1, "ready raised towards the transmitter");
    repeat (delay) begin
      tick();
      check(hwtx_rdy == 1'b1 && hwtx_n == 1'b0, "ready held until ack");
    end
    hwtx_ack = 1'b1;
    tick();
    hwtx_ack = 1'b0;
    check(hwtx_n == 1'b1 && hwtx_rdy == 1'b0, "confirm one cycle after ack");
    tick();
    hwtx_v = val;
    tick();
    hwtx_v = ~val;
    bus_read(A_HWTX_CTRL, st);
    check(st[HWTX_ACKED] == 1'b1 && st[HWTX_READY] == 1'b0, "ACKED reported");
    bus_read(A_HWTX_VALUE, rd0);
    check(rd0 == val, "value captured from the line");
    bus_write(A_HWTX_CTRL, 32'h2);
    bus_read(A_HWTX_CTRL, st);
    check(st[HWTX_ACKED] == 1'b0, "CLEAR resets ACKED");
  endtask

  initial begin
    logic [BUS_DW-1:0] st;
    repeat (3) tick();
    rst = 1'b0;
    tick();
    bus_read(A_SWTX_CTRL, st);
    check(st[3:0] == 4'b0000, "gate idle, no receiver ready");
    sw_send($urandom, 1'b1);
    sw_send($urandom, 1'b0);
    sw_send($urandom, 1'b1);
    hw_send($urandom, 0);
    hw_send($urandom, 3);
    // offer withdrawn before the transmitter answers
    bus_write(A_HWTX_CTRL, 32'h1);
    check(hwtx_rdy == 1'b1, "offer raised");
    bus_write(A_HWTX_CTRL, 32'h2);
    check(hwtx_rdy == 1'b0, "offer withdrawn by CLEAR");
    hwtx_ack = 1'b1;
    tick();
    hwtx_ack = 1'b0;
    check(hwtx_n == 1'b0, "no confirm after withdrawal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
