// irq_sync: delivers an external interrupt to the three members of a triad
// at the same logical step of each member.
//
// The members of a triad run on their own corrected clocks, kept within a
// few pulses of each other, so they do not see a common instant. Each PM
// therefore counts the ticks of its own running clock in synchronization
// cycles of DIV ticks (the same length as the ADPLL divider) and numbers
// the cycles modulo 4. The counts restart while a PM is in no triad, so all
// members of a newly formed triad start together. When irq_req[h] arrives
// for the triad hosted by DRNM h, the target is the second next cycle
// number of the leading member; every member raises pm_irq on the tick that
// opens that cycle. The members are never more than one cycle apart, so the
// target is still ahead for all of them, and all of them take the interrupt
// after the same number of their own ticks.
//
// Interface: irq_req is a one-cycle request per host; a request for a host
// that has no complete triad, or while one is pending, is dropped. pm_irq[p]
// is a one-cycle pulse coincident with a tick of pm_clk[p]. A pending
// interrupt is cancelled when the triad's membership changes.
//
// From the document: interrupt requests are processed by each processor at
// the beginning of a synchronization cycle so that all redundant processors
// handle them at an identical logical step. This design's own: counting the
// ticks per PM, the modulo-4 cycle numbers and the choice of the second next
// cycle.
module irq_sync
  import gd_pkg::*;
#(
  parameter int unsigned N_DRNM = 5,
  parameter int unsigned N_PM   = 3 * N_DRNM,
  parameter int unsigned DIV    = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N_PM-1:0] pm_clk,
  input  logic [N_PM-1:0] pm_active,
  input  logic [ID_W-1:0] pm_tag [N_PM],
  input  logic [N_DRNM-1:0] irq_req,
  output logic [N_PM-1:0] pm_irq,
  output logic [N_DRNM-1:0] irq_pending
);

  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt [N_PM];    // ticks within the synchronization cycle
  logic [1:0]    cyc [N_PM];    // synchronization cycle number
  logic [N_PM-1:0] wrap;        // this tick opens a new cycle

  always_comb begin
    for (int p = 0; p < N_PM; p++) wrap[p] = pm_clk[p] && (cnt[p] == CW'(DIV - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N_PM; p++) begin cnt[p] <= '0; cyc[p] <= '0; end
    end else begin
      for (int p = 0; p < N_PM; p++) begin
        if (!pm_active[p]) begin
          cnt[p] <= '0;
          cyc[p] <= '0;
        end else if (pm_clk[p]) begin
          cnt[p] <= cnt[p] + 1'b1;
          if (wrap[p]) cyc[p] <= cyc[p] + 1'b1;
        end
      end
    end
  end

  // members, leading cycle number and delivery per host
  logic [N_PM-1:0] member [N_DRNM];
  logic [1:0]      target [N_DRNM];
  logic [N_PM-1:0] done_q [N_DRNM];
  logic [N_PM-1:0] member_q [N_DRNM];

  always_comb begin
    for (int h = 0; h < N_DRNM; h++)
      for (int p = 0; p < N_PM; p++)
        member[h][p] = pm_active[p] && (pm_tag[p] == ID_W'(h));
  end

  // leading cycle number of host h's members: the value v such that every
  // member is at v or v-1
  function automatic logic [1:0] lead_of(input logic [N_PM-1:0] m, input logic [1:0] c [N_PM]);
    logic [1:0] lead;
    lead = '0;
    for (int p = 0; p < N_PM; p++) begin
      if (m[p]) begin
        logic ok;
        ok = 1'b1;
        for (int j = 0; j < N_PM; j++)
          if (m[j] && (c[p] - c[j]) > 2'd1) ok = 1'b0;
        if (ok) lead = c[p];
      end
    end
    return lead;
  endfunction

  always_comb begin
    pm_irq = '0;
    for (int h = 0; h < N_DRNM; h++)
      for (int p = 0; p < N_PM; p++)
        if (irq_pending[h] && member_q[h][p] && !done_q[h][p] && wrap[p] && (cyc[p] + 2'd1) == target[h])
          pm_irq[p] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int h = 0; h < N_DRNM; h++) begin
        irq_pending[h] <= 1'b0;
        target[h]      <= '0;
        done_q[h]      <= '0;
        member_q[h]    <= '0;
      end
    end else begin
      for (int h = 0; h < N_DRNM; h++) begin
        if (irq_pending[h]) begin
          done_q[h] <= done_q[h] | (pm_irq & member_q[h]);
          if (member[h] != member_q[h] || (done_q[h] | (pm_irq & member_q[h])) == member_q[h])
            irq_pending[h] <= 1'b0;
        end else if (irq_req[h] && $countones(member[h]) == 3) begin
          irq_pending[h] <= 1'b1;
          target[h]      <= lead_of(member[h], cyc) + 2'd2;
          done_q[h]      <= '0;
          member_q[h]    <= member[h];
        end
      end
    end
  end

endmodule
