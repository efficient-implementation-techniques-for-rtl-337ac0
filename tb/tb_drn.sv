// tb_drn: self-checking testbench of the DRN ring (neighbourhood grouping).
//
// Five DRN modules with fifteen processor modules (PMs). First the example of
// the document: DRNM 2 with one failed PM, DRNM 3 with none left, DRNM 5 with
// one left, then a new failure on DRNM 1. The expected outcome, worked out by
// hand from the message rules: DRNM 1 invites DRNM 2, which grants and lends
// one PM, so DRNM 1 hosts a triad; DRNM 2 sends a join that bypasses DRNMs
// 3 and 4 to DRNM 5; DRNM 5 has one PM and invites DRNM 1, which rejects and
// ends the reconfiguration; DRNM 4 keeps its own triad.
// Then random single failures, one at a time, until few PMs are left. After
// each reconfiguration the checks are: the number of triads equals the
// number of DRNMs with three fault-free PMs plus floor(sum of the others'
// fault-free PMs / 3), as the document claims for the algorithm; every
// triad has exactly three fault-free members; retired PMs are idle; the
// running clocks of the members of each triad stay within a few pulses of
// each other.
module tb_drn;
  import gd_pkg::*;
  localparam int N = 5;
  localparam int NP = 3 * N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] pm_fail, pm_osc, pm_clk, pm_active;
  logic [ID_W-1:0] pm_tag [NP];
  logic err;
  logic [N-1:0] triad_here, locked, bypass, pulse_fix;
  msg_t req_msg [N], rsp_msg [N];
  int unsigned per [NP];

  pm_osc_model #(.N(NP)) u_osc (.clk, .rst_n, .per, .stop('0), .tick(pm_osc));

  drn #(.N_DRNM(N)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // message log of the example run
  int n_inv [N], n_join [N], n_done [N], n_ack [N], n_rej [N];
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (req_msg[i] == MSG_INVITE && !bypass[i]) n_inv[i]++;
      if (req_msg[i] == MSG_JOIN   && !bypass[i]) n_join[i]++;
      if (req_msg[i] == MSG_DONE   && !bypass[i]) n_done[i]++;
      if (rsp_msg[i] == MSG_ACK    && !bypass[i]) n_ack[i]++;
      if (rsp_msg[i] == MSG_REJECT && !bypass[i]) n_rej[i]++;
    end
  end

  task automatic clear_log();
    for (int i = 0; i < N; i++) begin
      n_inv[i] = 0; n_join[i] = 0; n_done[i] = 0; n_ack[i] = 0; n_rej[i] = 0;
    end
  endtask

  // wait for a reconfiguration to start and finish, then let clocks settle
  task automatic wait_reconfig();
    int t;
    t = 0;
    while (!err && t < 50) begin @(posedge clk); t++; end
    check(err, "error line raised after a failure");
    t = 0;
    while (err && t < 500) begin @(posedge clk); t++; end
    check(!err, "error line dropped: reconfiguration ended");
    repeat (20) @(posedge clk);
  endtask

  // structural checks and the triad count
  int reconfigs = 0;
  task automatic check_grouping();
    int f [N];
    int expect_triads, sum12, got_triads, members;
    sum12 = 0; expect_triads = 0;
    for (int i = 0; i < N; i++) begin
      f[i] = 0;
      for (int k = 0; k < 3; k++) if (!pm_fail[3*i+k]) f[i]++;
      if (f[i] == 3) expect_triads++;
      else sum12 += f[i];
    end
    expect_triads += sum12 / 3;
    got_triads = 0;
    for (int h = 0; h < N; h++) begin
      members = 0;
      for (int p = 0; p < NP; p++) if (pm_active[p] && pm_tag[p] == ID_W'(h)) begin
        members++;
        check(!pm_fail[p], $sformatf("retired PM %0d is not in a triad", p));
      end
      check(members == 0 || members == 3, $sformatf("triad of DRNM %0d has %0d members", h, members));
      check((members == 3) == triad_here[h], $sformatf("DRNM %0d hosts a triad iff it has 3 members", h));
      if (members == 3) got_triads++;
    end
    check(got_triads == expect_triads,
          $sformatf("triads %0d, expected %0d (fails %b)", got_triads, expect_triads, pm_fail));
  endtask

  // running clocks of triad members stay together
  task automatic check_clocks();
    int cnt [NP];
    for (int p = 0; p < NP; p++) cnt[p] = 0;
    repeat (3000) begin
      @(posedge clk);
      for (int p = 0; p < NP; p++) if (pm_clk[p]) cnt[p]++;
    end
    for (int h = 0; h < N; h++) begin
      int lo, hi;
      lo = 1 << 30; hi = 0;
      for (int p = 0; p < NP; p++) if (pm_active[p] && pm_tag[p] == ID_W'(h)) begin
        if (cnt[p] < lo) lo = cnt[p];
        if (cnt[p] > hi) hi = cnt[p];
      end
      if (hi > 0) begin
        check(hi - lo <= 6, $sformatf("triad %0d clocks within 6 pulses: %0d..%0d sel %p %p %p", h, lo, hi, dut.g_m[0].u_drnm.sel, dut.g_m[1].u_drnm.sel, dut.g_m[2].u_drnm.sel));
        check(lo > 600, $sformatf("triad %0d clocks run (%0d pulses)", h, lo));
        check(locked[h], $sformatf("triad %0d locked", h));
      end
    end
    for (int p = 0; p < NP; p++) if (!pm_active[p]) check(cnt[p] == 0, $sformatf("idle PM %0d has no clock", p));
  endtask

  initial begin
    for (int p = 0; p < NP; p++) per[p] = (p % 3 == 0) ? 164 : (p % 3 == 1) ? 170 : 176;
    pm_fail = '0;
    clear_log();
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (50) @(posedge clk);
    // ---- fault-free cluster: five triads, all in bypass
    check(triad_here == 5'b11111 && bypass == 5'b11111 && !err, "fault-free: five local triads");
    check_clocks();

    // ---- the example: faults preset on DRNMs 2, 3 and 5 (no reconfiguration
    // is started for faults present before the run's first failure event)
    // Each preset failure is itself a reconfiguration event; apply and wait.
    pm_fail[5] = 1'b1;              wait_reconfig();   // DRNM2: one failed
    pm_fail[8:6] = 3'b111;          wait_reconfig();   // DRNM3: none left
    pm_fail[13] = 1'b1;             wait_reconfig();
    pm_fail[14] = 1'b1;             wait_reconfig();   // DRNM5: one left
    check_grouping();
    clear_log();
    pm_fail[0] = 1'b1;              wait_reconfig();   // latest failure, DRNM1
    // expected message traffic of the example
    check(n_inv[0] == 1, "DRNM1 sends invite");
    check(n_ack[1] == 1, "DRNM2 grants the invite");
    check(n_join[1] == 1, "DRNM2 sends join");
    check(n_inv[4] == 1, "DRNM5 sends invite to DRNM1");
    check(n_rej[0] == 1, "DRNM1 rejects and ends");
    check(n_join[2] == 0 && n_inv[2] == 0 && n_join[3] == 0 && n_inv[3] == 0, "DRNM3/4 take no part");
    check(triad_here == 5'b01001, "triads on DRNM1 and DRNM4 only");
    check(pm_active[4] && pm_tag[4] == 0 || pm_active[3] && pm_tag[3] == 0, "a PM of DRNM2 joins DRNM1's triad");
    check(!pm_active[12], "DRNM5's last PM stays out");
    check_grouping();
    check_clocks();

    // ---- random single failures from a fresh start
    rst_n = 0; pm_fail = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    for (int r = 0; r < 40; r++) begin
      int p;
      if ($countones(~pm_fail) <= 2) begin
        rst_n = 0; pm_fail = '0;
        repeat (3) @(posedge clk);
        rst_n = 1;
        repeat (20) @(posedge clk);
      end
      do p = $urandom_range(NP - 1); while (pm_fail[p]);
      pm_fail[p] = 1'b1;
      wait_reconfig();
      reconfigs++;
      check_grouping();
      if (r % 8 == 0) check_clocks();
    end
    $display("reconfigurations=%0d", reconfigs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
