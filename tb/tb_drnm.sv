// tb_drnm: self-checking testbench of one DRN module, with the testbench
// playing both ring neighbours and the rest of the error line.
//
// Steps, each with the expected replies worked out from the message rules:
//  1. three fault-free PMs: local triad, ring messages bypassed one cycle later;
//  2. a PM fails: the module becomes initiator with two PMs, raises the error
//     line and invites; a grant makes it host a triad with the clock arriving
//     on R1; a request arriving on R5 is rejected and the line dropped after
//     the guard time;
//  3. another module's reconfiguration: an invite is granted by lending a PM
//     toward R5, then a join goes out; its grant lends the last PM toward R1;
//     the lent PMs take the hosts' identifiers as triad tags;
//  4. a second PM fails: initiator with one PM sends join; the invite coming
//     round the ring is rejected;
//  5. as a one-PM participant, a join is answered with an invite onward and,
//     when that is granted, a triad of upstream, own and downstream PM;
//  6. as a one-PM participant, done is answered with join;
//  7. the last PM fails: done is sent, and afterwards the module bypasses.
//
// The message set (invite, join, done, grant, reject) and the bypass of
// modules with zero or three PMs follow the document; the one-cycle-per-hop
// timing and the message encoding are this design's own.
module tb_drnm;
  import gd_pkg::*;
  localparam int ID = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] pm_fail, pm_osc, pm_clk, pm_active, n_insert, n_delete;
  logic [ID_W-1:0] pm_tag [3];
  logic err_in, err_out, tb_err, bypass, triad_here, locked, initiator;
  ring_link_t r1_in, r1_out, r5_in, r5_out;
  int unsigned per [3] = '{164, 170, 176};
  int checks = 0, failures = 0;
  logic [1:0] remote_osc;

  pm_osc_model #(.N(3)) u_osc (.clk, .rst_n, .per, .stop('0), .tick(pm_osc));
  int unsigned rper [2] = '{168, 172};
  pm_osc_model #(.N(2)) u_rosc (.clk, .rst_n, .per(rper), .stop('0), .tick(remote_osc));

  assign err_in = err_out | tb_err;

  drnm #(.ID(ID), .N_RING(5)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // what the testbench drives on the ring inputs besides messages
  bit r1_src_on, r5_src_on;
  bit r1_host_on, r5_host_on;
  logic [ID_W-1:0] r1_host, r5_host;
  msg_t m1, m5;
  always_comb begin
    r1_in = '0; r5_in = '0;
    r1_in.msg = m1; r5_in.msg = m5;
    r1_in.src_clk = r1_src_on & remote_osc[0];
    r5_in.src_clk = r5_src_on & remote_osc[1];
    r1_in.ret_clk = r1_host_on & pm_osc[2];
    r5_in.ret_clk = r5_host_on & pm_osc[1];
    r1_in.host_valid = r1_host_on; r1_in.host_id = r1_host;
    r5_in.host_valid = r5_host_on; r5_in.host_id = r5_host;
  end

  task automatic send1(input msg_t m); @(negedge clk); m1 = m; @(negedge clk); m1 = MSG_NONE; endtask
  task automatic send5(input msg_t m); @(negedge clk); m5 = m; @(negedge clk); m5 = MSG_NONE; endtask

  // wait up to n cycles for a message on an output port
  task automatic expect1(input msg_t m, input string what);
    int t; t = 0;
    while (r1_out.msg != m && t < 12) begin @(negedge clk); t++; end
    check(r1_out.msg == m, what);
  endtask
  task automatic expect5(input msg_t m, input string what);
    int t; t = 0;
    while (r5_out.msg != m && t < 12) begin @(negedge clk); t++; end
    check(r5_out.msg == m, what);
  endtask

  // count ticks on a signal over a window
  task automatic count_ticks(output int c1ret, c5ret, c1src, c5src, output int pmc [3]);
    c1ret = 0; c5ret = 0; c1src = 0; c5src = 0;
    for (int k = 0; k < 3; k++) pmc[k] = 0;
    repeat (400) begin
      @(negedge clk);
      c1ret += int'(r1_out.ret_clk); c5ret += int'(r5_out.ret_clk);
      c1src += int'(r1_out.src_clk); c5src += int'(r5_out.src_clk);
      for (int k = 0; k < 3; k++) pmc[k] += int'(pm_clk[k]);
    end
  endtask

  initial begin
    int a, b, c, d;
    int pc [3];
    m1 = MSG_NONE; m5 = MSG_NONE; tb_err = 0; pm_fail = 0;
    r1_src_on = 0; r5_src_on = 0; r1_host_on = 0; r5_host_on = 0; r1_host = 0; r5_host = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    // ---- 1. local triad and bypass
    check(bypass && triad_here && pm_active == 3'b111 && pm_tag[0] == ID, "local triad, bypass");
    @(negedge clk); m5 = MSG_JOIN; @(negedge clk); m5 = MSG_NONE;
    check(r1_out.msg == MSG_JOIN, "bypass forwards R5 -> R1 in one cycle");
    @(negedge clk); m1 = MSG_ACK; @(negedge clk); m1 = MSG_NONE;
    check(r5_out.msg == MSG_ACK, "bypass forwards R1 -> R5 in one cycle");
    count_ticks(a, b, c, d, pc);
    check(pc[0] > 80 && pc[1] > 80 && pc[2] > 80, "local PMs clocked");

    // ---- 2. initiator with two PMs
    @(negedge clk); pm_fail = 3'b001;
    repeat (2) @(negedge clk);
    check(err_out && initiator && !bypass, "initiator raises the error line");
    expect1(MSG_INVITE, "initiator with two PMs invites");
    r1_src_on = 1;
    send1(MSG_ACK);
    repeat (2) @(negedge clk);
    check(triad_here && pm_active == 3'b110, "triad of two local PMs and the R1 clock");
    send5(MSG_JOIN);
    expect5(MSG_REJECT, "request back at initiator is rejected");
    check(err_out, "error line held during the guard time");
    repeat (8) @(negedge clk);
    check(!err_out && !initiator, "error line dropped");
    count_ticks(a, b, c, d, pc);
    check(a > 80 && r1_out.host_valid && r1_out.host_id == ID, "corrected clock and host id returned on R1");
    check(pc[1] > 80 && pc[2] > 80 && pc[0] == 0, "fault-free PMs clocked, retired PM stopped");
    r1_src_on = 0;

    // ---- 3. participant with two PMs: invite then join
    @(negedge clk); tb_err = 1;
    repeat (2) @(negedge clk);
    check(!triad_here && !bypass, "participant decouples its old triad");
    send5(MSG_INVITE);
    expect5(MSG_ACK, "invite granted");
    expect1(MSG_JOIN, "join sent onward with the last PM");
    r5_host_on = 1; r5_host = 8'd2;
    send1(MSG_ACK);
    r1_host_on = 1; r1_host = 8'd4;
    repeat (2) @(negedge clk);
    count_ticks(a, b, c, d, pc);
    check(d > 80 && c > 80, "PMs lent toward R5 and R1");
    check(pc[1] > 80 && pc[2] > 80, "lent PMs get the returned clocks");
    check(pm_active == 3'b110 && pm_tag[1] == 2 && pm_tag[2] == 4, "lent PMs tagged with their hosts");
    tb_err = 0;
    repeat (3) @(negedge clk);
    check(pm_tag[1] == 2 && pm_tag[2] == 4, "grouping kept after the error line drops");
    r1_host_on = 0; r5_host_on = 0;

    // ---- 4. initiator with one PM
    @(negedge clk); pm_fail = 3'b011;
    expect1(MSG_JOIN, "initiator with one PM sends join");
    send5(MSG_INVITE);
    expect5(MSG_REJECT, "invite coming round is rejected");
    repeat (10) @(negedge clk);
    check(!err_out && !triad_here, "no triad, error line dropped");

    // ---- 5. one-PM participant receives join
    @(negedge clk); tb_err = 1;
    repeat (2) @(negedge clk);
    send5(MSG_JOIN);
    expect1(MSG_INVITE, "one PM: join answered by invite onward");
    r1_src_on = 1; r5_src_on = 1;
    send1(MSG_ACK);
    expect5(MSG_ACK, "join granted once the invite is granted");
    repeat (2) @(negedge clk);
    check(triad_here && pm_active == 3'b100, "triad of upstream, own and downstream PM");
    count_ticks(a, b, c, d, pc);
    check(a > 80 && b > 80 && r1_out.host_valid && r5_out.host_valid, "clocks returned both ways");
    tb_err = 0;
    r1_src_on = 0; r5_src_on = 0;
    repeat (3) @(negedge clk);

    // ---- 6. one-PM participant receives done
    @(negedge clk); tb_err = 1;
    repeat (2) @(negedge clk);
    send5(MSG_DONE);
    expect1(MSG_JOIN, "one PM: done answered by join");
    send1(MSG_ACK);
    repeat (2) @(negedge clk);
    count_ticks(a, b, c, d, pc);
    check(c > 80, "PM lent toward R1 after the grant");
    tb_err = 0;
    repeat (3) @(negedge clk);

    // ---- 7. last PM fails
    @(negedge clk); pm_fail = 3'b111;
    expect1(MSG_DONE, "no PM left: done");
    send5(MSG_DONE);
    repeat (10) @(negedge clk);
    check(!err_out && bypass && pm_active == 3'b000, "error line dropped, bypass");
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
