// tb_vote_watchdog: self-checking testbench of the voter time-out watchdog.
// Case 1: two channels ready, the third never: the time-out must come
// exactly TIMEOUT cycles after the first ready bit, naming the missing
// channel. Case 2: the third channel arrives in time and the vote happens:
// no time-out. Case 3: all ready but no vote (memory busy): no time-out.
//
// A watchdog for stalled ready bits follows the document; the time-out of 64
// cycles is this design's own.
module tb_vote_watchdog;
  localparam int TIMEOUT = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [2:0] ready, stalled;
  logic vote, timeout;
  int checks = 0, failures = 0;

  vote_watchdog #(.TIMEOUT(TIMEOUT)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int t, seen;
    ready = 0; vote = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // case 1
    @(negedge clk); ready = 3'b011;
    t = 0; seen = 0;
    while (!seen && t < 100) begin
      @(negedge clk); t++;
      if (timeout) seen = t;
    end
    check(seen == TIMEOUT, $sformatf("time-out after %0d cycles, expected %0d", seen, TIMEOUT));
    check(stalled == 3'b100, "stalled channel 2 reported");
    // case 2
    ready = 3'b000; @(negedge clk);
    ready = 3'b101;
    seen = 0;
    repeat (TIMEOUT - 5) begin @(negedge clk); if (timeout) seen = 1; end
    ready = 3'b111; vote = 1; @(negedge clk); vote = 0; ready = 3'b000;
    repeat (2 * TIMEOUT) begin @(negedge clk); if (timeout) seen = 1; end
    check(!seen, "no time-out when the vote comes in time");
    // case 3
    ready = 3'b111; seen = 0;
    repeat (3 * TIMEOUT) begin @(negedge clk); if (timeout) seen = 1; end
    check(!seen, "no time-out while all channels are ready");
    // case 4: repeated stalls keep firing
    ready = 3'b001; seen = 0;
    repeat (3 * TIMEOUT + 1) begin @(negedge clk); if (timeout) seen++; end
    check(seen == 3, $sformatf("three time-outs in 3*TIMEOUT cycles, got %0d", seen));
    check(stalled == 3'b110, "stalled channels 1 and 2 reported");
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
