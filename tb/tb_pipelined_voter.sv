// tb_pipelined_voter: self-checking testbench of the TMR pipelined voter.
//
// Three channels write the same stream of words, each at its own random
// pace (so the buffers fill unevenly, as with skewed clocks); memory accepts
// at random. Every 7th word one channel's copy is corrupted. Checks: memory
// receives exactly the stream, in order, with every corruption masked and
// reported against the right channel; the earliest vote comes one cycle
// after the last copy is written and the result one cycle later; the
// buffers report full at 8 words; a channel that stops writing triggers the
// watchdog, which names it.
//
// The buffers with ready bits, the AND vote enable and the watchdog follow
// the document; the one-cycle vote and the output register are this design's
// own.
module tb_pipelined_voter;
  localparam int W = 32, DEPTH = 8, TIMEOUT = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] ch_wr, ch_full, fault_mask, stalled;
  logic [W-1:0] ch_data [3];
  logic mem_valid, mem_ready, fault_valid, timeout;
  logic [W-1:0] mem_data;
  int checks = 0, failures = 0;

  pipelined_voter #(.W(W), .DEPTH(DEPTH), .TIMEOUT(TIMEOUT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  localparam int NW = 300;
  logic [W-1:0] stream [NW];
  int idx [3];
  int got = 0, masked = 0, fulls = 0, timeouts = 0;
  int expect_mask [NW];
  bit stop2 = 0, mem_rand = 1, manual = 0;

  // channel writers
  always @(negedge clk) if (rst_n && !manual) begin
    for (int c = 0; c < 3; c++) begin
      ch_wr[c] = 0;
      if (idx[c] < NW && !ch_full[c] && !(stop2 && c == 2) && $urandom_range(99) < 40 + 20 * c) begin
        ch_wr[c]   = 1;
        ch_data[c] = stream[idx[c]];
        if (idx[c] % 7 == 3 && c == (idx[c] / 7) % 3) ch_data[c] = stream[idx[c]] ^ (32'h1 << (idx[c] % 32));
        idx[c]++;
      end
      if (ch_full[c]) fulls++;
    end
    mem_ready = mem_rand ? ($urandom_range(99) < 70) : 1'b1;
  end

  // memory side
  always @(posedge clk) if (rst_n) begin
    if (mem_valid && mem_ready && got < NW) begin
      check(mem_data == stream[got], $sformatf("word %0d: %h expected %h", got, mem_data, stream[got]));
      got++;
    end
    if (fault_valid) begin
      masked++;
    end
    if (timeout) timeouts++;
  end

  initial begin
    int t0, t1;
    for (int i = 0; i < NW; i++) stream[i] = $urandom;
    ch_wr = 0; mem_ready = 0;
    for (int c = 0; c < 3; c++) begin idx[c] = 0; ch_data[c] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (got == NW);
    repeat (5) @(posedge clk);
    check(masked == (NW - 3) / 7 + 1, $sformatf("masked faults %0d", masked));
    check(fulls > 0, "a channel buffer became full");
    check(timeouts == 0, "no watchdog time-out while all channels write");
    // latency: one word on each channel in the same cycle, memory always ready
    mem_rand = 0;
    manual = 1;
    mem_ready = 1;
    @(negedge clk);
    ch_wr = 3'b111;
    for (int c = 0; c < 3; c++) ch_data[c] = 32'hCAFE0001;
    t0 = $time;
    @(negedge clk);
    ch_wr = 0;
    wait (mem_valid);
    t1 = $time;
    check((t1 - t0 + 5) / 10 == 2, $sformatf("write-to-memory latency %0d cycles, expected 2", (t1 - t0 + 5) / 10));
    check(mem_data == 32'hCAFE0001, "latency word");
    // watchdog: channel 2 stops
    stop2 = 1;
    @(negedge clk);
    ch_wr = 3'b011; ch_data[0] = 1; ch_data[1] = 1;
    @(negedge clk);
    ch_wr = 0;
    repeat (TIMEOUT + 5) @(negedge clk);
    check(timeouts == 1, $sformatf("watchdog fired once, got %0d", timeouts));
    check(stalled == 3'b100, "watchdog names channel 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-vote check of the fault report
  int vote_no = 0, last_vote = -1;
  always @(posedge clk) if (rst_n) begin
    if (fault_valid)
      check(last_vote % 7 == 3 && fault_mask == 3'b001 << ((last_vote / 7) % 3),
            $sformatf("vote %0d: fault reported on channel mask %b", last_vote, fault_mask));
    if (dut.vote) begin last_vote = vote_no; vote_no++; end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
