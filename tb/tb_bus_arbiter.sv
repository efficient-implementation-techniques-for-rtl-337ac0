// tb_bus_arbiter: self-checking testbench of the triad-aware bus arbiter.
//
// Fifteen PMs in five triads with a mixed membership (triads hosted by
// DRNMs 0, 1, 3 and 4; PMs 9..11 idle; triad 1 made of PMs 1, 5 and 13).
// Checks: a triad is never granted unless all three of its members are
// ready; a triad with only two ready members is never granted; no grant
// while memory is not ready; grants are one cycle long with an idle cycle
// between them; with all triads requesting, each is granted in turn (round
// robin: four triads share the bus equally).
//
// The rule that a triad is granted only when all three members are ready
// follows the document; the membership patterns, the round-robin order
// checked and the idle cycle after each grant are this design's own.
module tb_bus_arbiter;
  import gd_pkg::*;
  localparam int N = 5, NP = 15;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NP-1:0] ready, active;
  logic [ID_W-1:0] tag [NP];
  logic mem_ready, grant_valid;
  logic [ID_W-1:0] grant_id;
  logic [N-1:0] triad_req;
  int checks = 0, failures = 0;

  bus_arbiter #(.N_DRNM(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // membership: host of each PM (255 = none)
  int host [NP] = '{0, 1, 0, 0, 3, 1, 3, 3, 4, 255, 255, 255, 4, 1, 4};
  function automatic bit all_ready(input int h, input logic [NP-1:0] r);
    int n;
    n = 0;
    for (int p = 0; p < NP; p++) if (host[p] == h && r[p]) n++;
    return n == 3;
  endfunction

  int grants [N];
  logic [NP-1:0] ready_q;
  logic mem_q, prev_grant;
  always @(posedge clk) if (rst_n) begin
    if (grant_valid) begin
      check(all_ready(int'(grant_id), ready_q), $sformatf("granted triad %0d had all members ready", grant_id));
      check(mem_q, "memory was ready at the grant decision");
      check(!prev_grant, "idle cycle between grants");
      check(grant_id != 2, "no grant to a DRNM that hosts no triad");
      grants[grant_id]++;
    end
    prev_grant = grant_valid;
    ready_q = ready;
    mem_q = mem_ready;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      active[p] = host[p] != 255;
      tag[p] = (host[p] == 255) ? 8'd2 : 8'(host[p]);
    end
    ready = 0; mem_ready = 1; prev_grant = 0; ready_q = 0; mem_q = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // random phase
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      ready = NP'($urandom) | NP'($urandom);
      ready[9] = 1; ready[10] = 1; ready[11] = 1;   // idle PMs: never a triad
      mem_ready = $urandom_range(3) != 0;
    end
    // only two members of triad 3 ready
    @(negedge clk);
    ready = 0; ready[4] = 1; ready[6] = 1;
    for (int k = 0; k < N; k++) grants[k] = 0;
    repeat (20) @(negedge clk);
    check(grants[3] == 0, "two ready members are not enough");
    // all requesting: fair share
    ready = '1;
    for (int k = 0; k < N; k++) grants[k] = 0;
    repeat (400) @(negedge clk);
    check(grants[0] == 50 && grants[1] == 50 && grants[3] == 50 && grants[4] == 50,
          $sformatf("round robin %0d %0d %0d %0d", grants[0], grants[1], grants[3], grants[4]));
    check(triad_req == 5'b11011, "triad requests reported");
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
