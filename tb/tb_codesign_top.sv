// tb_codesign_top: end-to-end test of the hardware side at its default
// parameters. The testbench plays the processor and its event-polling
// scheduler on the register bus:
//   - it starts both hardware modules through the hardware scheduler;
//   - CASE1 (software transmits): it waits until the echo process E reports
//     ready on gate gA, writes the value, issues ACK and checks DONE;
//   - CASE2 (hardware transmits): it offers READY on gate gB, waits for
//     ACKED and reads back the value E returns, which must be the one sent;
//   - it issues ACK while E is not ready (FAIL expected) and withdraws a
//     READY offer before E can answer;
//   - meanwhile the example process P exchanges v1/v2 internally, and x, y,
//     z are checked against the values offered;
//   - it starts the receive-choice system with both transmitters at once and
//     the mixed-choice system with its transmitter and receiver at once, and
//     checks the exit records and received values.
// Every mechanism is counted and a mechanism that never happened counts as
// a failure.
module tb_codesign_top;
  import ttl_pkg::*;
  logic clk = 1'b0, rst = 1'b1, bus_wr = 1'b0, p_exit;
  logic [BUS_AW-1:0] bus_addr = '0;
  logic [BUS_DW-1:0] bus_wdata = '0, bus_rdata;
  value_t v1 = '0, v2 = '0, x, y, z, c2_v, c3_u, c3_y;
  int checks = 0, failures = 0;
  int n_start = 0, n_case1 = 0, n_case1_fail = 0, n_case2 = 0, n_withdraw = 0;
  int n_g1 = 0, n_g2 = 0, n_enable = 0, n_c2_tie = 0, n_c3_ack1 = 0, n_c3_mixed = 0;

  always #5 clk = ~clk;

  codesign_top dut (.*);

  always @(posedge clk) if (!rst) begin
    if (dut.u_p.g1_n) n_g1++;
    if (dut.u_p.g2_n) n_g2++;
    if (dut.u_p.p4_exit) n_enable++;
    if (dut.u_c3.g1_ack) n_c3_ack1++;
  end

  task automatic tick(); @(negedge clk); endtask
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  task automatic bus_write(input logic [BUS_AW-1:0] a, input logic [BUS_DW-1:0] d);
    bus_wr = 1'b1; bus_addr = a; bus_wdata = d;
    tick();
    bus_wr = 1'b0;
  endtask
  task automatic bus_read(input logic [BUS_AW-1:0] a, output logic [BUS_DW-1:0] d);
    bus_addr = a;
    #1 d = bus_rdata;
  endtask
  // poll a status bit until it has the wanted value; give up after 'limit' polls
  task automatic poll(input logic [BUS_AW-1:0] a, input int bit_i, input logic want,
                      input int limit, output logic ok);
    logic [BUS_DW-1:0] d;
    ok = 1'b0;
    for (int k = 0; k < limit && !ok; k++) begin
      bus_read(a, d);
      if (d[bit_i] == want) ok = 1'b1;
      else tick();
    end
  endtask

  // software sends one word to E over gA, then receives it back over gB
  task automatic echo_round(input value_t val);
    logic ok;
    logic [BUS_DW-1:0] d;
    poll(A_SWTX_CTRL, SWTX_RDY, 1'b1, 20, ok);
    check(ok, "E ready to receive on gA");
    bus_write(A_SWTX_VALUE, val);
    bus_write(A_SWTX_CTRL, 32'h1);
    poll(A_SWTX_CTRL, SWTX_BUSY, 1'b0, 10, ok);
    bus_read(A_SWTX_CTRL, d);
    check(ok && d[SWTX_DONE], "CASE1 rendezvous done");
    if (ok && d[SWTX_DONE]) n_case1++;
    // E now waits to transmit: an ACK on gA must fail
    bus_read(A_SWTX_CTRL, d);
    check(d[SWTX_RDY] == 1'b0, "E not ready on gA while holding a word");
    bus_write(A_SWTX_CTRL, 32'h1);
    poll(A_SWTX_CTRL, SWTX_BUSY, 1'b0, 10, ok);
    bus_read(A_SWTX_CTRL, d);
    check(ok && d[SWTX_FAIL], "ACK without a ready receiver fails");
    if (ok && d[SWTX_FAIL]) n_case1_fail++;
    // CASE2: receive the word back
    bus_write(A_HWTX_CTRL, 32'h1);
    poll(A_HWTX_CTRL, HWTX_ACKED, 1'b1, 20, ok);
    check(ok, "CASE2 ack from E");
    bus_read(A_HWTX_VALUE, d);
    check(d == val, "E returned the word sent");
    if (ok && d == val) n_case2++;
    bus_write(A_HWTX_CTRL, 32'h2);
  endtask

  initial begin
    logic [BUS_DW-1:0] d;
    value_t first_v2;
    logic ok;
    repeat (3) tick();
    rst = 1'b0;
    v1 = $urandom;
    v2 = $urandom;
    first_v2 = v2;
    tick();
    // an offer made before E is started is withdrawn unanswered
    bus_write(A_HWTX_CTRL, 32'h1);
    repeat (5) tick();
    bus_read(A_HWTX_CTRL, d);
    check(d[HWTX_READY] && !d[HWTX_ACKED], "offer pending while E is not started");
    bus_write(A_HWTX_CTRL, 32'h2);
    bus_read(A_HWTX_CTRL, d);
    check(d[1:0] == 2'b00, "offer withdrawn");
    if (d[1:0] == 2'b00) n_withdraw++;
    // start both hardware modules
    bus_write(A_SCHED_START, 32'h3);
    bus_read(A_SCHED_START, d);
    check(d[1:0] == 2'b11, "both modules started");
    if (d[1:0] == 2'b11) n_start++;
    for (int k = 0; k < 8; k++) begin
      echo_round($urandom);
      if (k == 3) begin
        check(x == v1 && y == first_v2 && z == v2, "P exchanged v1 and v2");
        v1 = $urandom;
        v2 = $urandom;
      end
    end
    // receive choice: R first, then T1 and T2 in the same cycle
    bus_write(A_SCHED_START, 32'h24);        // R of system 2, TR of system 3
    bus_write(A_SCHED_START, 32'h18);        // T1 and T2
    repeat (20) tick();
    bus_read(A_SCHED_EXIT, d);
    check(d[4:3] == 2'b11, "T1 and T2 both served");
    check(c2_v == v2, "receive choice ends with T2's value");
    if (d[4:3] == 2'b11 && c2_v == v2) n_c2_tie++;
    // mixed choice: T and R in the same cycle
    bus_write(A_SCHED_START, 32'hC0);
    repeat (20) tick();
    bus_read(A_SCHED_EXIT, d);
    check(d[7:6] == 2'b11, "T and R of the mixed choice both served");
    check(c3_u == v1 && c3_y == v2, "mixed choice exchanged both values");
    if (d[7:6] == 2'b11) n_c3_mixed++;
    repeat (20) tick();
    check(x == v1, "x follows new v1");
    check(z == v2, "z follows new v2");
    check(y == first_v2, "y keeps the first g2 value");
    check(p_exit == 1'b0, "P never exits");
    bus_read(A_SCHED_EXIT, d);
    check(d[1:0] == 2'b00, "recursive modules never exit");
    // every mechanism must have happened
    check(n_start > 0, "mechanism: scheduler start");
    check(n_case1 > 0, "mechanism: CASE1 software to hardware");
    check(n_case1_fail > 0, "mechanism: CASE1 retry on missing receiver");
    check(n_case2 > 0, "mechanism: CASE2 hardware to software");
    check(n_withdraw > 0, "mechanism: offer withdrawn");
    check(n_g1 > 0, "mechanism: choice takes g1");
    check(n_g2 > 0, "mechanism: choice takes g2");
    check(n_enable == 1, "mechanism: P4 >> P5 enable, exactly once");
    check(n_c2_tie > 0, "mechanism: receive choice with simultaneous transmitters");
    check(n_c3_mixed > 0, "mechanism: mixed choice serves both branches");
    check(n_c3_ack1 >= 2, "mechanism: unconfirmed ack retried in the mixed choice");
    $display("mechanisms: start=%0d case1=%0d case1_fail=%0d case2=%0d withdraw=%0d g1=%0d g2=%0d enable=%0d c2_tie=%0d c3_mixed=%0d c3_ack1=%0d",
             n_start, n_case1, n_case1_fail, n_case2, n_withdraw, n_g1, n_g2, n_enable, n_c2_tie, n_c3_mixed, n_c3_ack1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
