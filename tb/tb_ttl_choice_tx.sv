// tb_ttl_choice_tx: self-checking test of the two-way transmit choice. The
// receivers of both gates are modelled by the testbench. dut uses the
// a-priori choice of the first branch; dut_rr uses the rotating option and
// must alternate when both gates are always ready. Checked: no ack while no
// gate is ready, ack only on the chosen gate, value and done of that branch
// two cycles after the ack, branch 0 winning a tie, and the return to the
// choice when the chosen receiver does not confirm, after which the other
// gate can be served. dut_w is a three-way choice with two receivers per
// gate: a gate counts only when both its receivers are ready, and a missing
// confirm from one of the two sends the block back to the choice.
module tb_ttl_choice_tx;
  localparam int unsigned W = 32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [1:0] done, g_ack;
  logic [1:0][0:0] g_rdy = '0, g_n = '0;
  logic [1:0][W-1:0] g_v, v_t;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ttl_choice_tx #(.W(W), .NB(2), .N_RX(1)) dut (.*);

  // rotating instance, both gates permanently ready, receivers always confirm
  logic       rr_start = 1'b0;
  logic [1:0] rr_done, rr_ack, rr_ack_q;
  logic [1:0][W-1:0] rr_v;
  ttl_choice_tx #(.W(W), .NB(2), .N_RX(1), .ROTATE(1'b1)) dut_rr (
    .clk, .rst, .start(rr_start | (|rr_done)), .done(rr_done), .g_rdy(2'b11), .g_ack(rr_ack),
    .g_n(rr_ack_q), .g_v(rr_v), .v_t(v_t)
  );
  always_ff @(posedge clk) rr_ack_q <= rst ? 2'b00 : rr_ack;

  // three-way choice with two receivers per gate (n-way, one-to-many)
  logic       w_start = 1'b0;
  logic [2:0] w_done, w_ack;
  logic [2:0][1:0] w_rdy = '0, w_n = '0;
  logic [2:0][W-1:0] w_v, w_vt;
  ttl_choice_tx #(.W(W), .NB(3), .N_RX(2)) dut_w (
    .clk, .rst, .start(w_start), .done(w_done), .g_rdy(w_rdy), .g_ack(w_ack),
    .g_n(w_n), .g_v(w_v), .v_t(w_vt)
  );

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // rdy_mask raised now; expect branch b to be chosen and completed
  task automatic serve(input logic [1:0] rdy_mask, input int b, input logic loop);
    g_rdy = rdy_mask;
    tick();
    check(g_ack == (2'b01 << b), $sformatf("ack on branch %0d only", b));
    g_rdy = rdy_mask & ~(2'b01 << b);        // chosen receiver leaves its wait step
    tick();
    check(g_ack == 2'b00, "ack lasts one cycle");
    g_n = 2'b01 << b;
    tick();
    check(done == (2'b01 << b), $sformatf("done of branch %0d", b));
    check(g_v[b] == v_t[b] && g_v[1-b] == '0, "value on the chosen gate only");
    g_n = '0;
    g_rdy = '0;
    start = loop;
    tick();
    start = 1'b0;
    check(done == 2'b00, "done lasts one cycle");
  endtask

  int rr_cnt [2];
  always @(posedge clk) if (!rst) for (int b = 0; b < 2; b++) if (rr_done[b]) rr_cnt[b]++;

  initial begin
    v_t[0] = $urandom;
    v_t[1] = $urandom;
    repeat (3) tick();
    rst = 1'b0;
    tick();
    start = 1'b1;
    rr_start = 1'b1;
    tick();
    start = 1'b0;
    rr_start = 1'b0;
    repeat (3) begin tick(); check(g_ack == 2'b00, "no ack while no gate ready"); end
    serve(2'b10, 1, 1'b1);
    serve(2'b11, 0, 1'b1);                    // tie: first branch wins
    serve(2'b01, 0, 1'b1);
    // chosen branch 0 is not confirmed: back to the choice
    g_rdy = 2'b11;
    tick();
    check(g_ack == 2'b01, "tie acked on branch 0");
    g_rdy = 2'b10;                            // receiver 0 went elsewhere, 1 still waits
    tick();
    tick();                                   // no confirm
    check(done == 2'b00, "no transfer without confirm");
    serve(2'b10, 1, 1'b0);
    repeat (3) begin tick(); check(g_ack == 2'b00 && done == 2'b00, "idle after last rendezvous"); end
    // n-way, one-to-many: a gate counts as ready only when both its receivers are
    for (int b = 0; b < 3; b++) w_vt[b] = $urandom;
    w_start = 1'b1;
    tick();
    w_start = 1'b0;
    w_rdy = '{2'b01, 2'b10, 2'b01};          // no gate complete
    repeat (3) begin tick(); check(w_ack == 3'b000, "3-way: no ack with half-ready gates"); end
    w_rdy = '{2'b11, 2'b10, 2'b11};          // gates 2 and 0 complete, gate 0 wins
    tick();
    check(w_ack == 3'b001, "3-way: first complete gate acked");
    w_rdy = '{2'b11, 2'b10, 2'b00};
    tick();
    w_n[0] = 2'b01;                          // one receiver of gate 0 missing
    tick();
    w_n = '0;
    check(w_done == 3'b000, "3-way: no transfer with one confirm missing");
    tick();                                  // back in the choice: gate 2 is complete
    check(w_ack == 3'b100, "3-way: gate 2 acked after gate 0 failed");
    w_rdy = '0;
    tick();
    w_n[2] = 2'b11;
    tick();
    w_n = '0;
    check(w_done == 3'b100 && w_v[2] == w_vt[2] && w_v[1:0] == '0, "3-way: gate 2 transfers its value");
    check(rr_cnt[0] >= 3 && (rr_cnt[0] - rr_cnt[1] <= 1) && (rr_cnt[1] - rr_cnt[0] <= 1),
          $sformatf("rotating choice alternates (%0d/%0d)", rr_cnt[0], rr_cnt[1]));
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
