// tb_page_tag_scan: checks the page update tags and the realignment scan at
// the full size (4 * 10^6 words in 6320 pages of 633 words).
//
// A model keeps its own set of tagged pages. Writes go to random words of
// ten random pages (ten faulty pages is the example's bound), to the last,
// shorter page, and beyond the end of memory (ignored). Each scan is checked
// word for word against the model: every word of every tagged page, in
// address order, and nothing else. With the voter always ready the scan
// must take exactly K + sum of tagged page sizes cycles. A second scan with a
// voter that is often not ready must deliver the same words. A write during
// a scan, to a page already passed, must leave that page tagged.
//
// The update tag per page and the realignment time K + F W/K vote times
// follow the document; one vote per cycle and the rounded-up page size are
// this design's own.
module tb_page_tag_scan;
  localparam int unsigned MEM_WORDS = 4000000, K = 6320, AW = 24;
  localparam int unsigned PAGE = (MEM_WORDS + K - 1) / K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_valid = 0, start = 0, busy, done, rv_valid, rv_ready = 1;
  logic [AW-1:0] wr_addr = 0, rv_addr;
  logic [$clog2(K+1)-1:0] n_tagged;

  page_tag_scan dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  typedef logic [$clog2(K)-1:0] KW_t;
  bit model [int];   // tagged pages

  task automatic write(input int unsigned a);
    @(negedge clk);
    wr_valid = 1; wr_addr = AW'(a);
    @(negedge clk);
    wr_valid = 0;
    if (a < MEM_WORDS) model[a / PAGE] = 1;
  endtask

  function automatic int unsigned page_len(input int unsigned p);
    return (p * PAGE + PAGE > MEM_WORDS) ? MEM_WORDS - p * PAGE : PAGE;
  endfunction

  // expected words in order
  int unsigned exp_q [$];
  int unsigned got_n, cyc, bad_words;
  bit ready_random = 0;
  int unsigned late_page = 0;
  bit late_write = 0;

  always @(negedge clk) rv_ready = ready_random ? ($urandom_range(2) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (busy) cyc++;
    if (rv_valid && rv_ready) begin
      if (exp_q.size() == 0) bad_words++;
      else begin
        if (32'(rv_addr) != exp_q[0]) bad_words++;
        void'(exp_q.pop_front());
      end
      got_n++;
    end
  end

  task automatic scan(input string what);
    int unsigned sum_words, npages;
    sum_words = 0; npages = 0;
    exp_q.delete();
    foreach (model[p]) begin
      npages++;
      sum_words += page_len(p);
      for (int unsigned w = 0; w < page_len(p); w++) exp_q.push_back(p * PAGE + w);
    end
    check(n_tagged == npages, $sformatf("%s: %0d pages tagged, model %0d", what, n_tagged, npages));
    got_n = 0; cyc = 0; bad_words = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin
      @(posedge clk);
      if (late_write && busy && dut.idx > KW_t'(late_page)) begin
        late_write = 0;
        @(negedge clk); wr_valid = 1; wr_addr = AW'(late_page * PAGE + 5);
        @(negedge clk); wr_valid = 0;
      end
    end
    model.delete();
    check(bad_words == 0 && exp_q.size() == 0, $sformatf("%s: realigned words match (%0d bad, %0d missing)", what, bad_words, exp_q.size()));
    check(got_n == sum_words, $sformatf("%s: %0d words realigned, expected %0d", what, got_n, sum_words));
    if (!ready_random)
      check(cyc == K + sum_words, $sformatf("%s: scan took %0d cycles, expected K + F*W/K = %0d", what, cyc, K + sum_words));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    check(n_tagged == 0, "no tags after reset");
    scan("empty");
    // ten pages, random words, some pages written several times
    for (int i = 0; i < 10; i++) begin
      int unsigned p;
      p = $urandom_range(K - 2);
      repeat ($urandom_range(1, 3)) write(p * PAGE + $urandom_range(PAGE - 1));
    end
    write(MEM_WORDS - 1);            // last page (shorter)
    write(MEM_WORDS + 17);           // beyond memory: ignored
    write((1 << AW) - 1);
    scan("ten pages");
    check(n_tagged == 0, "tags cleared after scan");
    // same with a slow voter, and a write behind the scanner
    for (int i = 0; i < 10; i++) write($urandom_range(MEM_WORDS - 1));
    write(0);
    ready_random = 1;
    late_page = 0; late_write = 1;
    scan("slow voter");
    check(n_tagged == 1 && dut.tag[0], "page written behind the scanner stays tagged");
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
