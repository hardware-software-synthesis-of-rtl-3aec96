// tb_ttl_choice_rxtx: self-checking test of the mixed choice g1?v [] g2!v.
// The transmitter on g1 and the receiver on g2 are modelled by the
// testbench. Checked: an ack on g1 wins over a ready receiver on g2, the
// receive branch confirms and loads g1's value, the transmit branch acks,
// waits for the confirm and drives its value, and an unconfirmed transmit
// returns to the choice with g1_rdy raised again.
module tb_ttl_choice_rxtx;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [1:0] done;
  logic g1_rdy, g1_ack = 1'b0, g1_n, g2_ack;
  logic [0:0] g2_rdy = '0, g2_n = '0;
  logic [W-1:0] g1_v = '0, v_r, g2_v, v_t = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ttl_choice_rxtx #(.W(W), .N_RX(1)) dut (.*);

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic recv(input logic also_g2_rdy);
    logic [W-1:0] val;
    val = $urandom;
    check(g1_rdy == 1'b1, "g1 ready while choosing");
    g1_ack = 1'b1;
    g2_rdy = also_g2_rdy;
    tick();
    g1_ack = 1'b0;
    g2_rdy = 1'b0;
    check(g1_n == 1'b1 && g2_ack == 1'b0, "receive branch confirms, no ack on g2");
    tick();
    check(done == 2'b01, "done of receive branch");
    g1_v = val;
    start = 1'b1;
    tick();
    start = 1'b0;
    g1_v = '0;
    check(v_r == val, "value received on g1");
  endtask

  task automatic send(input logic confirm);
    v_t = $urandom;
    g2_rdy = 1'b1;
    tick();
    g2_rdy = 1'b0;
    check(g2_ack == 1'b1 && g1_rdy == 1'b0, "ack on g2, g1 withdrawn");
    tick();
    g2_n = confirm;
    tick();
    g2_n = 1'b0;
    if (confirm) begin
      check(done == 2'b10 && g2_v == v_t, "transmit branch drives its value");
      start = 1'b1;
      tick();
      start = 1'b0;
    end else begin
      check(done == 2'b00 && g2_v == '0, "no transfer without confirm");
      check(g1_rdy == 1'b1, "back to the choice");
    end
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    tick();
    start = 1'b1;
    tick();
    start = 1'b0;
    recv(1'b1);
    send(1'b1);
    recv(1'b0);
    send(1'b0);
    send(1'b1);
    recv(1'b1);
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
