// tb_ttl_tx: self-checking test of the transmitter event block with two
// receivers (one-to-many). The receivers are modelled by the testbench:
// inputs are driven and outputs sampled at the falling clock edge, so a
// value driven in the middle of a cycle is what the block samples at the
// end of it. Checked: no ack until every receiver is ready, ack for exactly
// one cycle one cycle later, value and done two cycles after the ack when
// both receivers confirm (three cycles after ready), and the return to
// waiting when only one receiver confirms.
module tb_ttl_tx;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, done, g_ack;
  logic [1:0] g_rdy = '0, g_n = '0;
  logic [W-1:0] g_v, v_t = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ttl_tx #(.W(W), .N_RX(2)) dut (.*);

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // one full rendezvous, both receivers raise ready in the same cycle
  task automatic rendezvous(input logic [W-1:0] val, input logic loop);
    v_t = val;
    g_rdy = 2'b11;
    tick();                                   // block is in step X+1
    check(g_ack == 1'b1 && done == 1'b0, "ack one cycle after all ready");
    check(g_v == '0, "value line idle during ack");
    g_rdy = 2'b00;
    tick();                                   // step X+2
    check(g_ack == 1'b0 && done == 1'b0, "ack lasts one cycle");
    g_n = 2'b11;
    tick();                                   // step X+3
    check(done == 1'b1, "done three cycles after ready");
    check(g_v == val, "value driven in last step");
    g_n = 2'b00;
    start = loop;
    tick();
    start = 1'b0;
    check(done == 1'b0 && g_v == '0, "done and value last one cycle");
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    tick();
    check(g_ack == 1'b0 && done == 1'b0, "idle after reset");
    start = 1'b1;
    tick();
    start = 1'b0;
    // only one receiver ready: nothing may happen
    g_rdy = 2'b01;
    repeat (4) begin tick(); check(g_ack == 1'b0, "no ack with one receiver missing"); end
    g_rdy = 2'b10;
    repeat (2) begin tick(); check(g_ack == 1'b0, "no ack with one receiver missing"); end
    rendezvous($urandom, 1'b1);
    rendezvous($urandom, 1'b1);
    // one receiver does not confirm: back to waiting, no value
    v_t = 32'hDEAD_BEEF;
    g_rdy = 2'b11;
    tick();
    check(g_ack == 1'b1, "ack before failed confirm");
    g_rdy = 2'b00;
    tick();
    g_n = 2'b01;
    tick();
    check(done == 1'b0 && g_v == '0, "no transfer without all confirms");
    g_n = 2'b00;
    repeat (3) begin tick(); check(g_ack == 1'b0, "waiting again after failed confirm"); end
    rendezvous($urandom, 1'b0);
    repeat (3) begin tick(); check(g_ack == 1'b0 && done == 1'b0, "idle after last rendezvous"); end
    g_rdy = 2'b11;
    repeat (3) begin tick(); check(g_ack == 1'b0, "idle block ignores ready"); end
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
