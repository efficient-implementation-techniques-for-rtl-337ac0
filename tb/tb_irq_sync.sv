// tb_irq_sync: self-checking testbench of the interrupt synchronizer.
//
// Two triads (PMs 0-2 on host 0, PMs 3-5 on host 1). All members tick in
// lock-step: the k-th tick of every member comes from the same master tick,
// delayed per member by 0 to 2 sampling cycles, and the delays change
// slowly so that members take turns leading. Interrupt requests come at
// random times. For every request each member must get exactly one pm_irq,
// on one of its own ticks; all three at the same tick count; on the tick
// that ends a synchronization cycle (tick count a multiple of DIV); and within three
// synchronization cycles of the request. A request to a host without a
// complete triad must be dropped.
//
// Taking interrupts at the start of a synchronization cycle follows the
// document; the counting scheme and the second-next-cycle rule are this
// design's own.
module tb_irq_sync;
  import gd_pkg::*;
  localparam int N_DRNM = 2, N_PM = 6, DIV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N_PM-1:0] pm_clk, pm_active, pm_irq;
  logic [ID_W-1:0] pm_tag [N_PM];
  logic [N_DRNM-1:0] irq_req, irq_pending;

  irq_sync #(.N_DRNM(N_DRNM), .DIV(DIV)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int cyc = 0;
  function automatic int master(input int k);
    return 10 + 4 * k + ((k % 3 == 0) ? 1 : 0);
  endfunction
  function automatic int dly(input int m, input int k);
    return (k / 50 + m) % 3;
  endfunction

  int ticks [N_PM];
  int irq_tick [N_PM];
  int n_irq [N_PM];

  always @(negedge clk) begin
    for (int m = 0; m < N_PM; m++) begin
      pm_clk[m] = 1'b0;
      if (rst_n && pm_active[m])
        for (int k = cyc / 4 - 3; k <= cyc / 4 + 1; k++)
          if (k >= 0 && master(k) + dly(m, k) == cyc) pm_clk[m] = 1'b1;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int m = 0; m < N_PM; m++) begin
      if (pm_irq[m]) begin
        check(pm_clk[m], $sformatf("PM %0d interrupt on one of its ticks", m));
        irq_tick[m] = ticks[m] + 1;
        n_irq[m]++;
      end
      if (pm_clk[m]) ticks[m]++;
    end
  end

  task automatic request(input int h, input bit expect_delivery);
    int base [3], t, req_tick;
    for (int i = 0; i < 3; i++) base[i] = n_irq[3*h+i];
    @(negedge clk); irq_req[h] = 1'b1; req_tick = ticks[3*h]; @(negedge clk); irq_req[h] = 1'b0;
    t = 0;
    while (t < 4 * DIV * 6) begin @(posedge clk); t++; end
    if (expect_delivery) begin
      for (int i = 0; i < 3; i++)
        check(n_irq[3*h+i] == base[i] + 1, $sformatf("host %0d PM %0d got one interrupt", h, 3*h+i));
      check(irq_tick[3*h] == irq_tick[3*h+1] && irq_tick[3*h] == irq_tick[3*h+2],
            $sformatf("host %0d: same tick count %0d/%0d/%0d", h, irq_tick[3*h], irq_tick[3*h+1], irq_tick[3*h+2]));
      check(irq_tick[3*h] % DIV == 0, $sformatf("host %0d: interrupt on the tick that ends a synchronization cycle (tick %0d)", h, irq_tick[3*h]));
      check(irq_tick[3*h] - req_tick <= 3 * DIV, $sformatf("host %0d: latency %0d ticks", h, irq_tick[3*h] - req_tick));
    end else begin
      for (int i = 0; i < 3; i++)
        check(n_irq[3*h+i] == base[i], $sformatf("host %0d PM %0d: request without a triad dropped", h, 3*h+i));
    end
  endtask

  initial begin
    for (int m = 0; m < N_PM; m++) begin
      pm_tag[m] = ID_W'(m / 3); ticks[m] = 0; n_irq[m] = 0; irq_tick[m] = -1;
    end
    pm_active = '1; irq_req = '0; pm_clk = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40; i++) begin
      repeat ($urandom_range(1, 60)) @(posedge clk);
      request($urandom_range(1), 1'b1);
    end
    // host 1 loses a member: requests to it are dropped
    pm_active[4] = 1'b0;
    request(1, 1'b0);
    request(0, 1'b1);
    // member comes back: counts restart together for the new triad
    @(negedge clk); pm_active[3] = 0; pm_active[5] = 0;
    for (int m = 3; m < 6; m++) ticks[m] = 0;
    @(negedge clk); pm_active[5:3] = 3'b111;
    request(1, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
