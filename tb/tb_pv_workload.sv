// tb_pv_workload: the voter experiment - queue lengths of a pipelined voter
// behind a processor triad, for write ratios of 10 % to 50 % and two vote
// times.
//
// Three processors run the same random program of load/store and ALU
// instructions. Their clock periods are 164, 170 and 176 time units (7 %
// apart); a sampling cycle here is two time units, and one instruction is
// taken as one processor clock period. The clocks are kept in step by the
// ADPLL, so the model lets a processor's instruction finish within a skew
// of S cycles of the nominal instant. Every store hands its word to the
// processor's channel of the voter at that instant. The voter's output
// (voting and writing memory) takes VOTE cycles per word: half an
// instruction in the first experiment, one and a half in the second.
//
// A last set of runs injects a stuck-at-1 fault on one data line of one
// processor halfway through the program, as in the published fault-injection
// experiment, and prints the latency until the voter first masks it.
//
// Checks, for each write ratio and vote time: every word reaches memory
// once and in order, with the word of a corrupted channel masked; no
// channel buffer ever fills; with the fast vote no queue holds more than
// one word (the published result: at most one); with the slow vote queues
// build up but stay below the buffer depth. The largest queue length of
// each run is printed.
//
// Write ratios, clock periods, buffer depth and the two vote times follow the
// document's experiment; the program model, the skew bound S and the time
// scale are this testbench's own.
module tb_pv_workload;
  localparam int W = 32, DEPTH = 8;
  localparam int IP = 85;              // instruction period, sampling cycles (170 / 2)
  localparam int S  = 4;               // skew bound, sampling cycles
  localparam int N_INSTR = 1200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [2:0] ch_wr, ch_full, fault_mask, stalled;
  logic [W-1:0] ch_data [3];
  logic mem_valid, mem_ready, fault_valid, timeout;
  logic [W-1:0] mem_data;

  pipelined_voter dut (.clk, .rst_n, .ch_wr, .ch_data, .ch_full, .mem_valid, .mem_data,
                       .mem_ready, .fault_valid, .fault_mask, .timeout, .stalled);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // program
  bit is_store [N_INSTR];
  int vote_cycles;
  int cyc;                 // cycle within the run
  int wr_cnt [3], n_out, n_exp, max_q, n_full, n_masked;
  bit run_on;

  // instant at which processor c finishes instruction i
  function automatic int finish_at(input int c, input int i);
    int off;
    off = (c == 0) ? 0 : ((i * 7 + c * 13) % (2 * S + 1)) - S;
    return 20 + i * IP + off;
  endfunction

  // processors: next instruction to finish, per processor
  int nxt [3];
  always @(negedge clk) begin
    ch_wr = '0;
    if (run_on) begin
      for (int c = 0; c < 3; c++) begin
        while (nxt[c] < N_INSTR && finish_at(c, nxt[c]) <= cyc && !is_store[nxt[c]]) nxt[c]++;
        if (nxt[c] < N_INSTR && finish_at(c, nxt[c]) == cyc) begin
          if (ch_full[c]) n_full++;
          ch_wr[c]   = 1'b1;
          ch_data[c] = 32'h00AB_0000 + nxt[c];
          if (!stuck_mode && c == 1 && nxt[c] % 9 == 0) ch_data[c] ^= 32'h0000_4000;   // corrupted copy
          if (stuck_mode && c == 2 && cyc >= stuck_at) ch_data[c] |= 32'h0000_0008;    // stuck-at-1 line
          wr_cnt[c]++;
          nxt[c]++;
        end
      end
    end
  end

  // memory: one word every vote_cycles cycles
  int busy_cnt;
  assign mem_ready = (busy_cnt == 0);
  int exp_q [$];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (mem_valid && mem_ready) begin
      check(exp_q.size() > 0 && mem_data == 32'h00AB_0000 + exp_q[0], $sformatf("memory word %h", mem_data));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      n_out++;
      busy_cnt <= vote_cycles - 1;
    end else if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
    if (fault_valid) n_masked++;
    for (int c = 0; c < 3; c++) begin
      int q;
      q = wr_cnt[c] - (n_out + int'(mem_valid));
      if (q > max_q) max_q = q;
    end
  end

  int max_q_of [2];       // largest queue: [0] fast vote, [1] slow vote
  int last_max, n_bad;
  bit stuck_mode = 0;
  int stuck_at = 0, first_mask;
  always @(posedge clk) if (rst_n && fault_valid && first_mask < 0) first_mask = cyc;
  task automatic run(input int ratio, input int vote_t);
    rst_n = 0; run_on = 0;
    exp_q.delete();
    n_exp = 0; n_bad = 0; first_mask = -1;
    for (int i = 0; i < N_INSTR; i++) begin
      is_store[i] = ($urandom_range(99) < ratio);
      if (is_store[i]) begin
        exp_q.push_back(i); n_exp++;
        if (!stuck_mode && i % 9 == 0) n_bad++;
        if (stuck_mode && finish_at(2, i) >= stuck_at && !i[3]) n_bad++;
      end
    end
    for (int c = 0; c < 3; c++) begin nxt[c] = 0; wr_cnt[c] = 0; end
    n_out = 0; max_q = 0; n_full = 0; n_masked = 0; cyc = 0; busy_cnt = 0;
    vote_cycles = vote_t;
    repeat (2) @(posedge clk);
    rst_n = 1; run_on = 1;
    repeat (N_INSTR * IP + 40 * vote_t + 100) @(posedge clk);
    run_on = 0;
    $display("write ratio %0d%%, vote %0d cycles: %0d stores, largest queue %0d words, %0d masked",
             ratio, vote_t, n_exp, max_q, n_masked);
    check(n_out == n_exp && exp_q.size() == 0, $sformatf("all %0d stores written (%0d)", n_exp, n_out));
    last_max = max_q;
    check(n_masked == n_bad, $sformatf("every corrupted word masked and reported (%0d of %0d)", n_masked, n_bad));
    check(n_full == 0, "no channel buffer filled");
    check(max_q < DEPTH, "queue stays below the buffer depth");
    if (stuck_mode) begin
      $display("  stuck-at-1 injected at cycle %0d, first masked at %0d: latency %0d cycles (%0d instructions)",
               stuck_at, first_mask, first_mask - stuck_at, (first_mask - stuck_at) / IP);
      check(first_mask >= stuck_at, "stuck-at fault masked after injection");
    end
  endtask

  initial begin
    for (int c = 0; c < 3; c++) ch_data[c] = '0;
    ch_wr = '0; run_on = 0; cyc = 0; busy_cnt = 0;
    max_q_of = '{0, 0};
    for (int r = 10; r <= 50; r += 10) begin
      run(r, IP / 2);
      check(last_max <= 1, $sformatf("fast vote, %0d%% writes: queue at most one word", r));
      if (last_max > max_q_of[0]) max_q_of[0] = last_max;
      run(r, IP * 3 / 2);
      if (last_max > max_q_of[1]) max_q_of[1] = last_max;
    end
    // fault injection: a data line of one processor stuck at 1 from the
    // middle of the program; every store that should have a 0 there is
    // masked, and the latency to the first masking is printed
    stuck_mode = 1;
    for (int r = 10; r <= 50; r += 20) begin
      stuck_at = (N_INSTR / 2) * IP + $urandom_range(IP - 1);
      run(r, IP / 2);
    end
    stuck_mode = 0;
    check(max_q_of[1] > 1, $sformatf("slow vote: queues build up (largest %0d)", max_q_of[1]));
    $display("largest queue: fast vote %0d, slow vote %0d", max_q_of[0], max_q_of[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
