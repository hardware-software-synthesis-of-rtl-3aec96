// tb_ttl_case3_system: self-checking test of TR := g1?u; TR [] g2!w; TR with
// a single-shot transmitter T (value a) on g1 and receiver R on g2. When all
// three start together, R is already ready when TR first chooses, so TR
// transmits w to R (R done four cycles after the start); T's first ack is
// left unconfirmed and T is served on TR's next round (done eight cycles
// after the start), delivering a into u. Then T and R are each run alone.
module tb_ttl_case3_system;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1;
  logic [2:0] start = '0, exit_o;
  logic [W-1:0] a = '0, w = '0, u, y;
  int checks = 0, failures = 0, n_ack1 = 0;

  always #5 clk = ~clk;

  ttl_case3_system #(.W(W)) dut (.*);

  always @(posedge clk) if (!rst && dut.g1_ack) n_ack1++;

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    int n, nr, nt;
    repeat (3) tick();
    rst = 1'b0;
    a = $urandom;
    w = $urandom;
    tick();
    start = 3'b111;
    nr = 0; nt = 0;
    for (n = 1; n <= 20 && nt == 0; n++) begin
      tick();
      start = '0;
      if (exit_o[2]) nr = n;
      if (exit_o[1]) nt = n;
    end
    check(nr == 4, $sformatf("R done four cycles after start (%0d)", nr));
    check(nt == 8, $sformatf("T done eight cycles after start (%0d)", nt));
    check(n_ack1 == 2, $sformatf("T acked twice, the first one unconfirmed (%0d)", n_ack1));
    tick();
    check(y == w, "R received w");
    check(u == a, "TR received a");
    // T alone
    a = $urandom;
    start = 3'b010;
    n = 0;
    do begin tick(); start = '0; n++; end while (!exit_o[1] && n < 20);
    check(n == 4, $sformatf("lone T done four cycles after start (%0d)", n));
    tick();
    check(u == a, "TR received the new a");
    // R alone
    w = $urandom;
    start = 3'b100;
    n = 0;
    do begin tick(); start = '0; n++; end while (!exit_o[2] && n < 20);
    check(n == 4, $sformatf("lone R done four cycles after start (%0d)", n));
    tick();
    check(y == w, "R received the new w");
    check(exit_o[0] == 1'b0, "TR never exits");
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
