// tb_ttl_rx: self-checking test of the receiver event block. The transmitter
// is modelled by the testbench (inputs driven, outputs sampled at the falling
// edge). Checked: ready raised once started and held until ack, confirm one
// cycle after the ack and for one cycle only, the value taken from the line
// in the step after the confirm (not earlier), done in that step, and a
// recursive restart through start = done.
module tb_ttl_rx;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, done, g_rdy, g_ack = 1'b0, g_n;
  logic [W-1:0] g_v = '0, v_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ttl_rx #(.W(W)) dut (.*);

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic rendezvous(input logic [W-1:0] val, input int wait_cycles, input logic loop);
    repeat (wait_cycles) begin
      tick();
      check(g_rdy == 1'b1 && g_n == 1'b0 && done == 1'b0, "ready held while waiting");
    end
    g_ack = 1'b1;
    g_v = ~val;                               // must not be taken yet
    tick();
    g_ack = 1'b0;
    check(g_n == 1'b1 && g_rdy == 1'b0 && done == 1'b0, "confirm one cycle after ack");
    tick();
    check(g_n == 1'b0 && done == 1'b1, "done in the load step");
    g_v = val;
    start = loop;
    tick();
    start = 1'b0;
    g_v = ~val;
    check(v_r == val, "value loaded from the line");
    check(done == 1'b0, "done lasts one cycle");
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    tick();
    check(g_rdy == 1'b0 && v_r == '0, "idle after reset");
    g_ack = 1'b1;
    tick();
    g_ack = 1'b0;
    check(g_n == 1'b0, "idle block ignores ack");
    start = 1'b1;
    tick();
    start = 1'b0;
    check(g_rdy == 1'b1, "ready raised after start");
    rendezvous($urandom, 3, 1'b1);
    check(g_rdy == 1'b1, "ready again after recursive restart");
    rendezvous($urandom, 0, 1'b1);
    rendezvous(32'h1234_5678, 5, 1'b0);
    tick();
    check(g_rdy == 1'b0 && v_r == 32'h1234_5678, "idle and value kept after last rendezvous");
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
