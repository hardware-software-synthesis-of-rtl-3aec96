// tb_ttl_example_p: self-checking test of the example P := P1 || P2 || P3.
// dut has the default (alternating) resolution of P1's choice; dut_fixed uses
// the first-branch-wins resolution. The values offered by P1 are held for
// long stretches and then changed, so the expected registers follow from the
// specification alone: x (P2) and z (P5) follow the latest v1 and v2, while
// y (P4) keeps the first value received on g2, because P4 runs once and then
// enables P5. Also checked: each rendezvous of P1 takes four cycles, both
// gates are served equally often, and with the fixed resolution g2 is never
// served, so y and z stay zero.
module tb_ttl_example_p;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, p_start = 1'b0, p_exit, f_exit;
  logic [W-1:0] v1 = '0, v2 = '0, x, y, z, fx, fy, fz;
  int checks = 0, failures = 0;
  int n_g1 = 0, n_g2 = 0, n_p5 = 0;

  always #5 clk = ~clk;

  ttl_example_p #(.W(W)) dut (.*);
  ttl_example_p #(.W(W), .FAIR_CHOICE(1'b0)) dut_fixed (
    .clk, .rst, .p_start, .p_exit(f_exit), .v1, .v2, .x(fx), .y(fy), .z(fz)
  );

  // count completed rendezvous on each gate (confirm pulses)
  always @(posedge clk) if (!rst) begin
    if (dut.g1_n) n_g1++;
    if (dut.g2_n) n_g2++;
    if (dut.p5_done) n_p5++;
  end

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    logic [W-1:0] first_v2;
    int c0;
    repeat (3) tick();
    rst = 1'b0;
    v1 = $urandom;
    v2 = $urandom;
    first_v2 = v2;
    tick();
    check(x == '0 && y == '0 && z == '0, "registers cleared by reset");
    p_start = 1'b1;
    tick();
    p_start = 1'b0;
    repeat (40) tick();
    check(x == v1, "x received v1 over g1");
    check(y == first_v2, "y received v2 over g2");
    check(z == v2, "z received v2 over g2 after P4 enabled P5");
    c0 = n_g1 + n_g2;
    repeat (200) tick();
    check(n_g1 + n_g2 - c0 == 50, $sformatf("one rendezvous every four cycles (%0d in 200)", n_g1 + n_g2 - c0));
    check(n_g1 - n_g2 <= 1 && n_g2 - n_g1 <= 1, $sformatf("gates served alternately (%0d/%0d)", n_g1, n_g2));
    for (int k = 0; k < 5; k++) begin
      v1 = $urandom;
      v2 = $urandom;
      repeat (20) tick();
      check(x == v1, "x follows v1");
      check(z == v2, "z follows v2");
      check(y == first_v2, "y keeps the first g2 value (P4 ran once)");
      check(fx == v1, "fixed choice: x follows v1");
      check(fy == '0 && fz == '0, "fixed choice: g2 never served");
    end
    check(n_p5 > 10, "P5 runs recursively");
    check(p_exit == 1'b0 && f_exit == 1'b0, "recursive processes never exit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
