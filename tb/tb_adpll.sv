// tb_adpll: self-checking testbench of the three-input ADPLL.
//
// Three raw clocks with the document's simulated periods 164, 170 and 176
// (ticks every 4.1, 4.25 and 4.4 sampling cycles). Over 40000 sampling
// cycles the raw tick counts drift apart by hundreds of pulses; the checks
// are that each corrected clock stays within SKEW_MAX+2 pulses of the middle
// one at every instant (two for the threshold, one for a correction still
// under way, one for the sampling of the ticks), that they run at the middle clock's rate, that the fast
// clock had pulses deleted and the slow clock pulses inserted, that the
// loop reports lock, and that `restart` realigns the dividers.
// A second run with the middle clock 7 % off both others (two at 176, one at
// 164) checks that an outlier is still followed.
module tb_adpll;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic restart, locked;
  logic [2:0] en, tick_in, tick_out, sync_clk, n_insert, n_delete;
  int unsigned per [3];
  int checks = 0, failures = 0;

  pm_osc_model #(.N(3)) u_osc (.clk, .rst_n, .per, .stop('0), .tick(tick_in));
  adpll #(.DIV(16), .SKEW_MAX(2)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  int raw [3], cor [3], ins [3], del [3], max_spread, mid_s = 1;
  always @(posedge clk) if (rst_n) begin
    int lo, hi;
    for (int s = 0; s < 3; s++) begin
      raw[s] += int'(tick_in[s]);
      cor[s] += int'(tick_out[s]);
      ins[s] += int'(n_insert[s]);
      del[s] += int'(n_delete[s]);
    end
    for (int s = 0; s < 3; s++) begin
      if (cor[s] - cor[mid_s] > max_spread) max_spread = cor[s] - cor[mid_s];
      if (cor[mid_s] - cor[s] > max_spread) max_spread = cor[mid_s] - cor[s];
    end
  end

  task automatic run(input int unsigned p0, p1, p2, input int mid);
    per[0] = p0; per[1] = p1; per[2] = p2;
    rst_n = 0;
    for (int s = 0; s < 3; s++) begin raw[s] = 0; cor[s] = 0; ins[s] = 0; del[s] = 0; end
    max_spread = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40000) @(posedge clk);
    check(max_spread <= 4, $sformatf("corrected clocks within 4 pulses of the middle one, worst %0d", max_spread));
    check(raw[0] - raw[2] > 200, $sformatf("raw clocks drift apart (%0d)", raw[0] - raw[2]));
    check(cor[mid] - raw[mid] <= 4 && raw[mid] - cor[mid] <= 4, "corrected rate is the middle clock's");
    check(del[0] > 0, "fast clock had pulses deleted");
    if (p2 > p1) check(ins[2] > 0, "slow clock had pulses inserted");
    check(locked, "loop locked");
  endtask

  initial begin
    restart = 0; en = 3'b111;
    per[0] = 164; per[1] = 170; per[2] = 176;
    run(164, 170, 176, 1);
    // restart clears the dividers
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    check(dut.pos[0] == dut.pos[1] && dut.pos[1] == dut.pos[2] && dut.pos[0] <= 1, "restart aligns dividers");
    // outlier: two slow clocks and one fast
    run(164, 176, 176, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
