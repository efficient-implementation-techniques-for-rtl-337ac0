// tb_gd_cluster: end-to-end testbench of the cluster at its default size
// (five DRN modules, fifteen processor modules), with processor models.
//
// Processor model: for every triad (three active PMs with the same tag) a
// new write is issued now and then to all three members; each member hands
// its copy to its queue on the ticks of its own running clock, so the three
// copies arrive at different times. Every issued word is unique and has bit
// 31 clear; a faulty PM flips bit 31, so a faulty word can never be mistaken
// for a good one.
//
// Sequence:
//  A. fault-free operation: five triads write through the MAT bus.
//  B. PM 5 starts to corrupt its writes: transfers of its triad are
//     invalidated and retried, a permanent fault is raised, the error
//     handler (testbench) retires PM 5, and the ring reconfigures.
//  C. PMs 6, 7, 8, 13, 14 retire one at a time, and finally PM 0: the
//     document's example. The last reconfiguration must leave triads on
//     DRNMs 0 (with a PM lent by DRNM 1) and 3 only.
//  Between A and B the memory is held busy so that every write queue fills.
//  D. the stand-alone pipelined voter is fed three channel streams with one
//     corrupted channel, then a channel stops.
// Checks: every word written to memory was issued, is good and is written
// once; words keep flowing after every reconfiguration; the grouping after
// each reconfiguration has the expected number of triads; triad clocks stay
// together. At the end the memory pages tagged by the writes are realigned.
// Each mechanism (invite, join, done, grant, reject, bypass,
// pulse insertion or deletion, bus invalidation, permanent fault, queue
// full, voter masking, voter time-out, realignment, interrupts) is counted
// and must occur. Interrupts are sent to every triad before the first and
// after the last reconfiguration; the members must take them at the same
// count of their own clock ticks.
module tb_gd_cluster;
  import gd_pkg::*;
  localparam int N = 5, NP = 15, W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NP-1:0] pm_osc, pm_fail, pm_clk, pm_active, pm_wr_en, pm_full, pm_perm_fault, pm_clear_fault;
  logic [ID_W-1:0] pm_tag [NP];
  logic [W-1:0] pm_wr_data [NP];
  logic mem_ready, mem_wr_valid, err, grant_valid, inval_bus;
  logic [W-1:0] mem_wr_data;
  logic [N-1:0] triad_here, locked, bypass, pulse_fix;
  msg_t req_msg [N], rsp_msg [N];
  logic [ID_W-1:0] grant_id;
  logic [2:0] pv_ch_wr, pv_ch_full, pv_fault_mask, pv_stalled;
  logic [W-1:0] pv_ch_data [3];
  logic pv_mem_valid, pv_mem_ready, pv_fault_valid, pv_timeout;
  logic [W-1:0] pv_mem_data;
  int unsigned per [NP];
  logic realign_start = 0, realign_busy, realign_done, rv_valid, rv_ready = 1;
  logic [W-9:0] rv_addr;
  logic [12:0] n_tagged;
  int n_realigned = 0;
  logic [N-1:0] irq_req = '0, irq_pending;
  logic [NP-1:0] pm_irq;
  int pm_ticks [NP], pm_irq_at [NP], n_irq = 0;
  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NP; p++) begin
      if (!pm_active[p]) pm_ticks[p] = 0;
      else if (pm_clk[p]) pm_ticks[p]++;
      if (pm_irq[p]) begin pm_irq_at[p] = pm_ticks[p]; n_irq++; end
    end
  // interrupt to every triad: all members take it at the same own tick count
  task automatic irq_all(input string when);
    for (int h = 0; h < N; h++) begin
      int m [$];
      for (int p = 0; p < NP; p++) if (pm_active[p] && pm_tag[p] == ID_W'(h)) begin m.push_back(p); pm_irq_at[p] = -1; end
      if (m.size() == 3) begin
        @(negedge clk); irq_req[h] = 1'b1; @(negedge clk); irq_req[h] = 1'b0;
        repeat (300) @(posedge clk);
        check(pm_irq_at[m[0]] > 0 && pm_irq_at[m[0]] == pm_irq_at[m[1]] && pm_irq_at[m[0]] == pm_irq_at[m[2]],
              $sformatf("%s: triad %0d takes the interrupt at one logical step (%0d/%0d/%0d)", when, h,
                        pm_irq_at[m[0]], pm_irq_at[m[1]], pm_irq_at[m[2]]));
      end
    end
  endtask
  always @(posedge clk) if (rv_valid && rv_ready) n_realigned++;

  pm_osc_model #(.N(NP)) u_osc (.clk, .rst_n, .per, .stop('0), .tick(pm_osc));

  gd_cluster dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // ------------------------------------------------------ processor models
  logic [W-1:0] pend [NP][$];
  bit issued [int];
  bit written [int];
  int next_word = 1, mem_writes = 0;
  bit faulty [NP];
  bit gen_on = 1;
  bit mem_hold = 0;

  always @(posedge clk) if (rst_n) begin
    // issue new writes to complete triads
    if (gen_on && !err) begin
      for (int h = 0; h < N; h++) begin
        int m [$];
        m.delete();
        for (int p = 0; p < NP; p++) if (pm_active[p] && pm_tag[p] == ID_W'(h) && !pm_fail[p]) m.push_back(p);
        if (m.size() == 3 && $urandom_range(99) < 3) begin
          bit room;
          room = 1;
          foreach (m[i]) if (pend[m[i]].size() > 4) room = 0;
          if (room) begin
            foreach (m[i]) pend[m[i]].push_back(W'(next_word));
            issued[next_word] = 1;
            next_word++;
          end
        end
      end
    end
  end

  // hand words to the queues on the PM's own clock
  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      pm_wr_en[p] = 1'b0;
      if (rst_n && pm_clk[p] && !pm_full[p] && pend[p].size() > 0) begin
        pm_wr_en[p]   = 1'b1;
        pm_wr_data[p] = faulty[p] ? (pend[p][0] | 32'h8000_0000) : pend[p][0];
        void'(pend[p].pop_front());
      end
    end
    mem_ready = !mem_hold && $urandom_range(9) != 0;
  end

  // memory
  always @(posedge clk) if (rst_n && mem_wr_valid) begin
    int w;
    w = int'(mem_wr_data);
    check(!mem_wr_data[31] && issued.exists(w), $sformatf("memory got an issued good word %h", mem_wr_data));
    check(!written.exists(w), $sformatf("word %h written once", mem_wr_data));
    written[w] = 1;
    mem_writes++;
  end

  // ------------------------------------------------------ mechanism counters
  int n_inv, n_join, n_done, n_ack, n_rej, n_bypass, n_fix, n_inval, n_perm, n_full;
  int n_pvmask, n_pvto, n_pvfull, n_grant_hosts;
  bit granted_host [N];
  logic [NP-1:0] perm_q;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) begin
      if (!bypass[i]) begin
        if (req_msg[i] == MSG_INVITE) n_inv++;
        if (req_msg[i] == MSG_JOIN)   n_join++;
        if (req_msg[i] == MSG_DONE)   n_done++;
        if (rsp_msg[i] == MSG_ACK)    n_ack++;
        if (rsp_msg[i] == MSG_REJECT) n_rej++;
      end else if (req_msg[i] != MSG_NONE) n_bypass++;
      if (pulse_fix[i]) n_fix++;
    end
    if (grant_valid && inval_bus) n_inval++;
    if (grant_valid) granted_host[grant_id] = 1;
    n_perm += $countones(pm_perm_fault & ~perm_q);
    perm_q = pm_perm_fault;
    if (|pm_full) n_full++;
    if (pv_fault_valid) n_pvmask++;
    if (pv_timeout) n_pvto++;
    if (|pv_ch_full) n_pvfull++;
  end

  // ------------------------------------------------------ helpers
  task automatic retire(input int p);
    int t;
    @(negedge clk);
    pm_fail[p] = 1'b1;
    t = 0;
    while (!err && t < 50) begin @(posedge clk); t++; end
    check(err, $sformatf("reconfiguration starts after retiring PM %0d", p));
    t = 0;
    while (err && t < 1000) begin @(posedge clk); t++; end
    check(!err, "reconfiguration ends");
    // host tags and clocks of lent PMs still travel through bypassed DRNMs
    repeat (2 * N) @(posedge clk);
  endtask

  task automatic check_triads(input string when);
    int f [N], expect_n, sum12, got;
    sum12 = 0; expect_n = 0; got = 0;
    for (int i = 0; i < N; i++) begin
      f[i] = 0;
      for (int k = 0; k < 3; k++) if (!pm_fail[3*i+k]) f[i]++;
      if (f[i] == 3) expect_n++; else sum12 += f[i];
    end
    expect_n += sum12 / 3;
    for (int h = 0; h < N; h++) begin
      int m;
      m = 0;
      for (int p = 0; p < NP; p++) if (pm_active[p] && pm_tag[p] == ID_W'(h)) m++;
      check(m == 0 || m == 3, $sformatf("%s: triad %0d has %0d members", when, h, m));
      if (m == 3) got++;
    end
    check(got == expect_n, $sformatf("%s: %0d triads, expected %0d", when, got, expect_n));
  endtask

  task automatic run_traffic(input int cycles, input string when);
    int w0;
    w0 = mem_writes;
    repeat (cycles) @(posedge clk);
    check(mem_writes > w0 + 10, $sformatf("%s: writes reach memory (%0d)", when, mem_writes - w0));
  endtask

  // ------------------------------------------------------ pipelined voter
  int pv_in [3], pv_out = 0;
  bit pv_stop = 0, pv_go = 0;
  always @(negedge clk) begin
    pv_mem_ready = $urandom_range(3) != 0;
    for (int c = 0; c < 3; c++) begin
      pv_ch_wr[c] = 1'b0;
      if (rst_n && pv_go && !pv_ch_full[c] && pv_in[c] < 200 && !(pv_stop && c == 0) &&
          $urandom_range(99) < 30 + 30 * c) begin
        pv_ch_wr[c]   = 1'b1;
        pv_ch_data[c] = (c == 1 && pv_in[c] % 5 == 0) ? (32'h5000 + pv_in[c]) ^ 32'h0F0 : 32'h5000 + pv_in[c];
        pv_in[c]++;
      end
    end
  end
  always @(posedge clk) if (rst_n && pv_mem_valid && pv_mem_ready) begin
    check(pv_mem_data == 32'h5000 + pv_out, $sformatf("voter output %h", pv_mem_data));
    pv_out++;
  end

  // ------------------------------------------------------ sequence
  int pl [5] = '{6, 7, 8, 13, 14};
  initial begin
    for (int p = 0; p < NP; p++) begin
      per[p] = (p % 3 == 0) ? 164 : (p % 3 == 1) ? 170 : 176;
      faulty[p] = 0;
    end
    for (int c = 0; c < 3; c++) begin pv_in[c] = 0; pv_ch_data[c] = 0; end
    pm_fail = 0; pm_clear_fault = 0; perm_q = 0; pv_ch_wr = 0; pm_wr_en = 0;
    for (int p = 0; p < NP; p++) begin pm_wr_data[p] = 0; pm_ticks[p] = 0; pm_irq_at[p] = -1; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    pv_go = 1;
    // A
    check_triads("start");
    run_traffic(4000, "fault-free");
    irq_all("fault-free");
    check(pv_out == 200, $sformatf("voter delivered all 200 words (%0d)", pv_out));
    // memory busy for a while: the write queues fill up
    mem_hold = 1;
    repeat (1500) @(posedge clk);
    check(&pm_full, "all write queues full while memory is busy");
    mem_hold = 0;
    run_traffic(2000, "after memory busy");
    // D (voter time-out): channel 0 stops
    pv_stop = 1; pv_in[1] = 0; pv_in[2] = 0; pv_in[0] = 200;
    repeat (200) @(posedge clk);
    // B
    faulty[5] = 1;
    begin
      int t;
      t = 0;
      while (!pm_perm_fault[5] && t < 20000) begin @(posedge clk); t++; end
      check(pm_perm_fault[5], "permanent fault raised on the faulty PM's node");
    end
    faulty[5] = 0;
    retire(5);
    @(negedge clk); pm_clear_fault = '1; @(negedge clk); pm_clear_fault = '0;
    check_triads("after PM 5");
    run_traffic(3000, "after PM 5");
    // C
    for (int i = 0; i < 5; i++) begin
      retire(pl[i]);
      check_triads($sformatf("after PM %0d", pl[i]));
      run_traffic(3000, $sformatf("after PM %0d", pl[i]));
    end
    retire(0);
    check_triads("example");
    check(triad_here == 5'b01001, "example: triads on DRNMs 0 and 3");
    check((pm_active[3] && pm_tag[3] == 0) || (pm_active[4] && pm_tag[4] == 0), "example: DRNM 1 lends a PM to DRNM 0");
    run_traffic(3000, "example");
    irq_all("example");
    // drain
    gen_on = 0;
    repeat (2000) @(posedge clk);
    check(locked[0] && locked[3], "example triads locked");
    // memory realignment: the words written so far have addresses below
    // 2^15, so they fall in the first pages of 633 words
    begin
      int unsigned pages, t;
      pages = 0;
      for (int unsigned pg = 0; pg * 633 <= (next_word >> 8); pg++) pages++;
      check(n_tagged == 13'(pages), $sformatf("%0d pages tagged, expected %0d", n_tagged, pages));
      @(negedge clk); realign_start = 1; @(negedge clk); realign_start = 0;
      t = 1;
      while (!realign_done && t < 20000) begin @(posedge clk); t++; end
      check(realign_done && n_realigned == pages * 633, $sformatf("realignment: %0d words in %0d cycles", n_realigned, t));
      // one cycle to take start, one for done
      check(t == 6320 + pages * 633 + 2, $sformatf("realignment took K + F*W/K vote times (%0d cycles)", t));
      check(n_tagged == 0, "tags cleared after realignment");
    end
    // mechanisms
    for (int h = 0; h < N; h++) n_grant_hosts += int'(granted_host[h]);
    $display("invite=%0d join=%0d done=%0d grant=%0d reject=%0d bypass=%0d pulse_fix=%0d",
             n_inv, n_join, n_done, n_ack, n_rej, n_bypass, n_fix);
    $display("bus_invalidate=%0d perm_fault=%0d queue_full_cycles=%0d hosts_granted=%0d mem_writes=%0d",
             n_inval, n_perm, n_full, n_grant_hosts, mem_writes);
    $display("pv_masked=%0d pv_timeout=%0d pv_full_cycles=%0d", n_pvmask, n_pvto, n_pvfull);
    check(n_inv > 0, "invite happened");
    check(n_join > 0, "join happened");
    check(n_done > 0, "done happened");
    check(n_ack > 0, "grant happened");
    check(n_rej > 0, "reject happened");
    check(n_bypass > 0, "bypass forwarding happened");
    check(n_fix > 0, "ADPLL pulse correction happened");
    check(n_inval >= 3, "MAT invalidation and retry happened");
    check(n_perm > 0, "permanent fault happened");
    check(n_full > 0, "write queues became full");
    check(n_grant_hosts == 5, "all five triads were granted the bus");
    check(n_pvmask == 40, $sformatf("voter masked 40 corrupted words (%0d)", n_pvmask));
    check(n_pvto > 0, "voter watchdog fired");
    check(n_pvfull > 0, "voter buffer became full");
    check(n_realigned > 0, "memory realignment happened");
    check(n_irq > 0, "interrupts delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
