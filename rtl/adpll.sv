// adpll: three-input all-digital phase-locked loop of a DRN module.
//
// Each of the three slices takes the raw clock of one processor module (as a
// one-cycle tick of the fast sampling clock) and passes it on as that
// module's running clock, adding or deleting single pulses to keep the three
// running clocks in step. Each slice divides its running clock by DIV
// (divide-by-16 in the document) into a synchronisation clock. At its own
// wrap a slice reads how far the other two dividers are into their cycle:
// a divider at position p < DIV/2 is p pulses ahead of the wrapping slice,
// one at DIV-p is p pulses behind. The slice takes the median of
// {0, skew to slice j, skew to slice k}; if that exceeds SKEW_MAX pulses (two in the document) it
// deletes (ahead) or inserts (behind) |median| pulses over the following
// cycles, so that it can follow a clock up to about 10 % faster or slower. Using
// the median makes the slice follow the middle clock, so a single runaway
// clock cannot drag the other two.
//
// `restart` clears all dividers so that the three clocks start a new
// synchronisation cycle together (used after reconfiguration). `locked`
// is high while, at its last wrap, every enabled slice was within SKEW_MAX+1
// pulses of the median (one pulse more than the correction threshold,
// because a slice may sit one pulse past it until its correction is made).
// An inserted pulse is placed in a sampling cycle without a raw tick, so the
// sampling clock must be at least twice as fast as the raw clocks.
// From the document: divide-by-16 synchronisation clocks, correction by
// adding or deleting pulses, the two-pulse threshold. This design's own: the
// median rule and the way skew is measured from the divider positions.
module adpll #(
  parameter int unsigned DIV      = 16,  // synchronisation clock divider
  parameter int unsigned SKEW_MAX = 2    // allowed skew in running-clock pulses
) (
  input  logic       clk,      // sampling clock
  input  logic       rst_n,
  input  logic       restart,  // restart all dividers together
  input  logic [2:0] en,       // slice has a source
  input  logic [2:0] tick_in,  // raw clock ticks
  output logic [2:0] tick_out, // corrected running-clock ticks
  output logic [2:0] sync_clk, // synchronisation clocks (divider MSB)
  output logic       locked,
  output logic [2:0] n_insert, // a pulse was inserted this cycle
  output logic [2:0] n_delete  // a pulse was deleted this cycle
);

  localparam int unsigned PW = $clog2(DIV);
  typedef logic signed [PW:0] skew_t;

  logic [PW-1:0] pos   [3];
  logic [PW-1:0] del_cnt [3];   // pulses still to delete
  logic [PW-1:0] ins_cnt [3];   // pulses still to insert
  logic [2:0]    del_pend, ins_pend, wrap, in_lock;

  function automatic skew_t pos_to_skew(input logic [PW-1:0] p);
    if (p < PW'(DIV / 2)) return skew_t'({1'b0, p});
    else                  return skew_t'({1'b0, p}) - skew_t'(DIV);
  endfunction

  function automatic skew_t median3(input skew_t a, input skew_t b, input skew_t c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      del_pend[s] = (del_cnt[s] != '0);
      ins_pend[s] = (ins_cnt[s] != '0);
      tick_out[s] = en[s] && ((tick_in[s] && !del_pend[s]) || (!tick_in[s] && ins_pend[s]));
      wrap[s]     = tick_out[s] && (pos[s] == PW'(DIV - 1));
      sync_clk[s] = pos[s][PW-1];
      n_insert[s] = en[s] && !tick_in[s] && ins_pend[s];
      n_delete[s] = en[s] && tick_in[s] && del_pend[s];
    end
  end

  assign locked = &(in_lock | ~en);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 3; s++) pos[s] <= '0;
      for (int s = 0; s < 3; s++) begin
        del_cnt[s] <= '0;
        ins_cnt[s] <= '0;
      end
      in_lock  <= '0;
    end else if (restart) begin
      for (int s = 0; s < 3; s++) pos[s] <= '0;
      for (int s = 0; s < 3; s++) begin
        del_cnt[s] <= '0;
        ins_cnt[s] <= '0;
      end
      in_lock  <= '1;
    end else begin
      for (int s = 0; s < 3; s++) begin
        skew_t m;
        skew_t skew [3][3];  // skew[s][j]: slice s relative to slice j
        if (tick_out[s]) pos[s] <= wrap[s] ? '0 : pos[s] + 1'b1;
        if (n_insert[s]) ins_cnt[s] <= ins_cnt[s] - 1'b1;
        if (n_delete[s]) del_cnt[s] <= del_cnt[s] - 1'b1;
        // phase detector: at the own wrap, the other dividers' positions
        // give the skew (position DIV-p: this slice is p pulses ahead;
        // position p: p pulses behind)
        for (int j = 0; j < 3; j++) begin
          skew[s][j] = (j == s) ? skew_t'(0) : -pos_to_skew(pos[j]);
        end
        // loop filter: at the own wrap, correct the whole skew
        m = median3(skew_t'(0), skew[s][(s+1)%3], skew[s][(s+2)%3]);
        if (!en[(s+1)%3]) m = skew[s][(s+2)%3];
        if (!en[(s+2)%3]) m = skew[s][(s+1)%3];
        if (wrap[s]) begin
          in_lock[s] <= (m <= skew_t'(SKEW_MAX + 1)) && (m >= -skew_t'(SKEW_MAX + 1));
          if (m > skew_t'(SKEW_MAX)) begin
            del_cnt[s] <= PW'(m);
            ins_cnt[s] <= '0;
          end else if (m < -skew_t'(SKEW_MAX)) begin
            ins_cnt[s] <= PW'(-m);
            del_cnt[s] <= '0;
          end
        end
      end
    end
  end

endmodule
