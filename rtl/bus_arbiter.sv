// bus_arbiter: triad-aware arbiter of the MAT bus.
//
// A triad may use the bus only when the ready bits of all three of its
// members are set, so that the three copies of a write are transmitted and
// monitored together. Triads are named by the DRNM that hosts them (the tag
// each PM gets from the DRN). For every possible host h the arbiter counts
// the active PMs tagged h and checks that there are three and all are
// ready; among the triads that qualify it grants one, round robin, for a
// single cycle (`grant_valid`, `grant_id`), and only while memory can take
// a write. A grant is followed by one idle cycle, so queues that were just
// emptied have dropped their ready bits before the next choice.
// From the document: grant only after all ready bits of the triad are set.
// This design's own: round robin, the one-cycle grant and the idle cycle.
// Lint: the round-robin loop index is an int of which only the low bits
// are used.
module bus_arbiter
  import gd_pkg::*;
#(
  parameter int unsigned N_DRNM = 5,
  parameter int unsigned N_PM   = 3 * N_DRNM
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_PM-1:0]   ready,
  input  logic [N_PM-1:0]   active,
  input  logic [ID_W-1:0]   tag [N_PM],
  input  logic              mem_ready,  // memory can take a write next cycle
  output logic              grant_valid,
  output logic [ID_W-1:0]   grant_id,
  output logic [N_DRNM-1:0] triad_req    // triads with all members ready
);

  localparam int unsigned HW = (N_DRNM > 1) ? $clog2(N_DRNM) : 1;
  logic [HW-1:0] last;

  always_comb begin
    for (int h = 0; h < N_DRNM; h++) begin
      int unsigned members, rdy;
      members = 0;
      rdy     = 0;
      for (int p = 0; p < N_PM; p++) begin
        if (active[p] && tag[p] == ID_W'(h)) begin
          members++;
          if (ready[p]) rdy++;
        end
      end
      triad_req[h] = (members == 3) && (rdy == 3);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_valid <= 1'b0;
      grant_id    <= '0;
      last        <= HW'(N_DRNM - 1);
    end else begin
      grant_valid <= 1'b0;
      if (!grant_valid && mem_ready) begin
        for (int k = N_DRNM; k >= 1; k--) begin
          int unsigned h;
          h = (int'(last) + k) % N_DRNM;
          if (triad_req[h]) begin
            grant_valid <= 1'b1;
            grant_id    <= ID_W'(h);
            last        <= HW'(h);
          end
        end
      end
    end
  end

endmodule
