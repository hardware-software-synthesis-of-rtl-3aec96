// tb_hw_scheduler: self-checking test of the hardware scheduler with two
// modules. Checked: a write of a start mask gives a one-cycle start pulse to
// exactly the selected modules one cycle after the write, the started mask
// accumulates, exit pulses are recorded, and restarting a module clears its
// exit record. Writes to other addresses have no effect.
module tb_hw_scheduler;
  import ttl_pkg::*;
  logic clk = 1'b0, rst = 1'b1, wr = 1'b0;
  logic [BUS_AW-1:0] addr = '0;
  logic [BUS_DW-1:0] wdata = '0, rdata;
  logic [1:0] mod_start, mod_exit = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hw_scheduler #(.N_MOD(2)) dut (.*);

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

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    tick();
    bus_read(A_SCHED_START, rd0);
    check(rd0 == 0 && mod_start == 2'b00, "nothing started after reset");
    bus_write(A_SWTX_VALUE, 32'h3);
    check(mod_start == 2'b00, "other addresses start nothing");
    bus_write(A_SCHED_START, 32'h2);
    check(mod_start == 2'b10, "start pulse for module 1 only");
    tick();
    check(mod_start == 2'b00, "start pulse lasts one cycle");
    bus_read(A_SCHED_START, rd0);
    check(rd0 == 32'h2, "started mask records module 1");
    bus_write(A_SCHED_START, 32'h1);
    check(mod_start == 2'b01, "start pulse for module 0 only");
    bus_read(A_SCHED_START, rd0);
    check(rd0 == 32'h3, "started mask accumulates");
    bus_read(A_SCHED_EXIT, rd0);
    check(rd0 == 32'h0, "no exits yet");
    mod_exit = 2'b01;
    tick();
    mod_exit = 2'b00;
    bus_read(A_SCHED_EXIT, rd0);
    check(rd0 == 32'h1, "exit of module 0 recorded");
    repeat (3) tick();
    bus_read(A_SCHED_EXIT, rd0);
    check(rd0 == 32'h1, "exit record kept");
    bus_write(A_SCHED_START, 32'h1);
    bus_read(A_SCHED_EXIT, rd0);
    check(rd0 == 32'h0, "restart clears exit record");
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
