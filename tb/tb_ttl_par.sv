// tb_ttl_par: self-checking test of the parallel-composition join with three
// processes. Checked: start reaches every process in the same cycle, the end
// pulse comes in the cycle of the last missing exit (exits arriving in any
// order and cycle), lasts one cycle, and a new start forgets earlier exits.
module tb_ttl_par;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, end_o;
  logic [2:0] p_start, p_exit = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ttl_par #(.N(3)) dut (.*);

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic run(input int order [3], input int gap);
    start = 1'b1;
    #1 check(p_start == 3'b111, "start broadcast to every process");
    tick();
    start = 1'b0;
    #1 check(p_start == 3'b000, "start is a pulse");
    for (int k = 0; k < 3; k++) begin
      repeat (gap) begin tick(); check(end_o == 1'b0, "no end before all exits"); end
      p_exit = 3'b001 << order[k];
      #1 check(end_o == (k == 2), $sformatf("end exactly with the last exit (%0d)", k));
      tick();
      p_exit = '0;
    end
    #1 check(end_o == 1'b0, "end lasts one cycle");
  endtask

  initial begin
    repeat (3) tick();
    rst = 1'b0;
    tick();
    run('{0, 2, 1}, 2);
    run('{2, 1, 0}, 0);
    run('{1, 0, 2}, 3);
    // exits seen before a new start are forgotten
    p_exit = 3'b011;
    tick();
    p_exit = '0;
    start = 1'b1;
    tick();
    start = 1'b0;
    p_exit = 3'b100;
    #1 check(end_o == 1'b0, "start clears exits seen before it");
    tick();
    p_exit = 3'b011;
    #1 check(end_o == 1'b1, "end after all exits following the start");
    tick();
    p_exit = '0;
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
