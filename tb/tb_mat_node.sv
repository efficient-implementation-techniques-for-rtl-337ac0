// tb_mat_node: self-checking testbench of the MAT bus interface.
//
// Three nodes form triad 7; a fourth node belongs to triad 2 and must stay
// off the bus. The bus is resolved here (AND of drivers, OR of invalidate).
// The testbench grants triad 7 whenever all three members are ready, every
// other cycle. Checks: words reach the bus in order and leave all three
// queues; the foreign node drives all ones and never commits; when one
// member's copy is corrupted, every attempt is invalidated and, after
// MAX_RETRY attempts, all three members report a permanent fault and stop
// requesting; clear_fault lets them retry, and the fault returns while the
// copies still differ; after a reset a clean word goes through again.
//
// Monitoring the own transmission, invalidation and retry follow the
// document; the limit of three retries and the queue flush are this design's
// own.
module tb_mat_node;
  import gd_pkg::*;
  localparam int W = 32, DEPTH = 8, MAX_RETRY = 3, NN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NN-1:0] wr_en, full, perm_fault, clear_fault, active, ready, invalidate, committed;
  logic [W-1:0] wr_data [NN], drive [NN];
  logic [ID_W-1:0] tag [NN];
  logic grant_valid, inval_bus;
  logic [ID_W-1:0] grant_id;
  logic [W-1:0] bus;
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NN; i++) begin : g_n
    mat_node #(.W(W), .DEPTH(DEPTH), .MAX_RETRY(MAX_RETRY)) dut (
      .clk, .rst_n,
      .wr_en(wr_en[i]), .wr_data(wr_data[i]), .full(full[i]),
      .perm_fault(perm_fault[i]), .clear_fault(clear_fault[i]),
      .active(active[i]), .tag(tag[i]),
      .ready(ready[i]), .grant_valid, .grant_id,
      .drive(drive[i]), .bus, .invalidate(invalidate[i]), .inval_bus,
      .committed(committed[i])
    );
  end

  always_comb begin
    bus = '1;
    for (int i = 0; i < NN; i++) bus &= drive[i];
    inval_bus = |invalidate;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // arbiter stand-in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin grant_valid <= 0; grant_id <= 7; end
    else grant_valid <= !grant_valid && (&ready[2:0]);
  end

  // bus monitor
  logic [W-1:0] seen [$];
  int invals = 0;
  always @(posedge clk) if (rst_n && grant_valid) begin
    if (!inval_bus) seen.push_back(bus);
    else invals++;
    check(drive[3] == '1 && !committed[3], "foreign node stays off the bus");
  end

  task automatic put3(input logic [W-1:0] d, input logic [W-1:0] flip2);
    @(negedge clk);
    wr_en[2:0] = 3'b111;
    wr_data[0] = d; wr_data[1] = d; wr_data[2] = d ^ flip2;
    @(negedge clk);
    wr_en[2:0] = 3'b000;
  endtask

  initial begin
    logic [W-1:0] words [20];
    wr_en = 0; clear_fault = 0; active = 4'b1111;
    tag[0] = 7; tag[1] = 7; tag[2] = 7; tag[3] = 2;
    for (int i = 0; i < NN; i++) wr_data[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // the foreign node has data waiting throughout
    @(negedge clk); wr_en[3] = 1; wr_data[3] = 32'h0; @(negedge clk); wr_en[3] = 0;
    // 1. clean stream
    for (int k = 0; k < 20; k++) begin words[k] = $urandom; put3(words[k], 0); end
    repeat (20) @(negedge clk);
    check(seen.size() == 20, $sformatf("20 words transferred, got %0d", seen.size()));
    for (int k = 0; k < 20 && k < seen.size(); k++) check(seen[k] == words[k], $sformatf("word %0d in order", k));
    check(ready[2:0] == 3'b000 && invals == 0, "queues drained without invalidation");
    check(ready[3], "foreign node still holds its word");
    // 2. permanent disagreement: node 2's copy differs (0 where others have 1)
    seen.delete();
    put3(32'hFFFF_FFFF, 32'h0000_0100);
    repeat (4 * MAX_RETRY) @(negedge clk);
    check(invals == MAX_RETRY, $sformatf("%0d invalidated attempts, expected %0d", invals, MAX_RETRY));
    check(perm_fault[2:0] == 3'b111, "permanent fault on all three members");
    check(seen.size() == 0, "nothing reached memory");
    check(ready[2:0] == 3'b000, "faulted nodes stop requesting");
    // 3. clear: the members retry the same differing copies
    @(negedge clk); clear_fault[2:0] = 3'b111; @(negedge clk); clear_fault = 0;
    repeat (4 * MAX_RETRY) @(negedge clk);
    check(perm_fault[2:0] == 3'b111, "fault persists while copies still differ");
    // 4. after a reset, a clean word goes through
    rst_n = 0; invals = 0; seen.delete();
    @(negedge clk); rst_n = 1;
    put3(32'h1234_5678, 0);
    @(posedge grant_valid);
    check(!inval_bus && seen.size() == 0, "clean transfer after reset");
    repeat (3) @(negedge clk);
    check(seen.size() == 1 && seen[0] == 32'h1234_5678, "word delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
