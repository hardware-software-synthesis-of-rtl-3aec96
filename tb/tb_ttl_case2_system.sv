// tb_ttl_case2_system: self-checking test of R := g1?v; R [] g2?v; R with
// single-shot transmitters T1 (value a) and T2 (value b). Checked: nothing
// is received before a transmitter starts, a lone transmitter finishes four
// cycles after its start, and when T1 and T2 start together T1 is served
// first and T2, left unconfirmed, four cycles later, with v holding a and
// then b. Expected cycle counts follow from the step sequences of the gate
// handshake.
module tb_ttl_case2_system;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] start = '0, exit_o;
  logic [W-1:0] a = '0, b = '0, v;
  int checks = 0, failures = 0, n_ack2 = 0;

  always #5 clk = ~clk;

  ttl_case2_system #(.W(W)) dut (.*);

  // acks given by T2; one more than its rendezvous means one went unconfirmed
  always @(posedge clk) if (!rst && dut.g_ack[1]) n_ack2++;

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic wait_exit(input int i, output int n);
    n = 0;
    do begin tick(); start = '0; n++; end while (!exit_o[i] && n < 50);
  endtask

  initial begin
    int n;
    repeat (3) tick();
    rst = 1'b0;
    a = $urandom;
    b = $urandom;
    tick();
    start = 3'b001;                      // R only
    tick();
    start = '0;
    repeat (5) begin tick(); check(v == '0 && exit_o == '0, "nothing without a transmitter"); end
    start = 3'b100;                      // T2 alone
    wait_exit(2, n);
    start = '0;
    check(n == 4, $sformatf("lone T2 done four cycles after start (%0d)", n));
    tick();
    check(v == b, "v received b on g2");
    a = $urandom;
    b = $urandom;
    start = 3'b110;                      // T1 and T2 together
    wait_exit(1, n);
    start = '0;
    check(n == 4, $sformatf("T1 served first, four cycles after start (%0d)", n));
    check(exit_o[2] == 1'b0, "T2 not served in the same round");
    wait_exit(2, n);
    check(n == 4, $sformatf("T2 served on R's next round (%0d)", n));
    check(v == a, "v held a before T2's value lands");
    tick();
    check(v == b, "v received b afterwards");
    check(n_ack2 == 3, $sformatf("T2 acked three times for two rendezvous (%0d)", n_ack2));
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
