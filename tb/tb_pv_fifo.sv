// tb_pv_fifo: self-checking testbench of the voter channel buffer.
// Random writes and pops against a queue model: head word, ready bit, full
// flag and fill count are compared every cycle; writes while full must be
// dropped. Also checks that the buffer holds exactly 8 words and that
// flush empties it.
//
// The 8-word depth follows the document; the write-refused-when-full rule and
// the flush are this design's own.
module tb_pv_fifo;
  localparam int W = 32, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, full, ready, pop, flush;
  logic [W-1:0] wr_data, head;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int fills = 0;

  pv_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    wr_en = 0; pop = 0; wr_data = 0; flush = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (count != q.size() || ready != (q.size() > 0) || full != (q.size() == DEPTH) ||
          (q.size() > 0 && head != q[0])) begin
        failures++;
        $display("FAIL: n=%0d count %0d model %0d", n, count, q.size());
      end
      if (q.size() == DEPTH) fills++;
      // phase: mostly write, then mostly read
      wr_en   = ((n / 200) % 2 == 0) ? ($urandom_range(3) != 0) : ($urandom_range(3) == 0);
      pop     = ((n / 200) % 2 == 0) ? ($urandom_range(3) == 0) : ($urandom_range(3) != 0);
      wr_data = $urandom;
      begin
        bit acc;
        acc = wr_en && q.size() < DEPTH;  // a full buffer refuses the write
        @(posedge clk);
        #1;
        if (pop && q.size() > 0) void'(q.pop_front());
        if (acc) q.push_back(wr_data);
      end
    end
    // flush empties the buffer
    @(negedge clk); wr_en = 1; pop = 0;
    repeat (3) @(negedge clk);
    wr_en = 0; flush = 1;
    @(negedge clk); flush = 0;
    checks++;
    if (ready || count != 0) begin failures++; $display("FAIL: flush"); end
    checks++;
    if (fills == 0) begin failures++; $display("FAIL: never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
