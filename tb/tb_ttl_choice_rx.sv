// tb_ttl_choice_rx: self-checking test of the two-way receive choice. The
// transmitters of both gates are modelled by the testbench. Checked: ready
// on both gates while choosing, confirm only on the acknowledging gate (the
// first one on a tie), the value loaded from that gate's line in the step
// after the confirm, and done of the matching branch.
module tb_ttl_choice_rx;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [1:0] done, g_rdy, g_ack = '0, g_n;
  logic [1:0][W-1:0] g_v = '0;
  logic [W-1:0] v_r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ttl_choice_rx #(.W(W), .NB(2)) dut (.*);

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic serve(input logic [1:0] ack_mask, input int b, input logic loop);
    logic [W-1:0] val;
    val = $urandom;
    check(g_rdy == 2'b11 && g_n == 2'b00, "ready on both gates while choosing");
    g_ack = ack_mask;
    tick();
    g_ack = '0;
    check(g_n == (2'b01 << b) && g_rdy == 2'b00, $sformatf("confirm on gate %0d only", b));
    tick();
    check(done == (2'b01 << b), $sformatf("done of branch %0d", b));
    g_v[b] = val;
    g_v[1-b] = ~val;
    start = loop;
    tick();
    start = 1'b0;
    g_v = '0;
    check(v_r == val, "value taken from the chosen gate");
    check(done == 2'b00, "done lasts one cycle");
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    tick();
    check(g_rdy == 2'b00, "idle after reset");
    start = 1'b1;
    tick();
    start = 1'b0;
    repeat (2) begin tick(); check(g_rdy == 2'b11, "waiting on both gates"); end
    serve(2'b10, 1, 1'b1);
    serve(2'b11, 0, 1'b1);
    serve(2'b01, 0, 1'b1);
    serve(2'b10, 1, 1'b0);
    tick();
    check(g_rdy == 2'b00, "idle after last rendezvous");
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
