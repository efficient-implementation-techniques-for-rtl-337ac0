// drnm: dynamic reconfiguration network module (DRNM).
//
// A DRNM has five access ports. Ports R2..R4 (index 0..2 here, `pm_*`) go to
// three processor modules (PMs); R1 and R5 go to the neighbouring DRNMs of a
// ring. Messages of the reconfiguration algorithm leave through R1 toward
// the next DRNM and arrive on R5 from the previous one; replies go the other
// way. A three-input ADPLL (adpll.sv) locks the clocks of the triad this
// DRNM hosts. Its three inputs are chosen by multiplexers from the five
// ports, and its corrected clocks are steered back by demultiplexers, so a
// triad can be made of local PMs and PMs lent by a neighbour. A DRNM that
// takes no part in a reconfiguration (all three or none of its PMs
// fault-free) switches its ring ports to bypass: whatever arrives on one
// ring port is sent on from the other, one cycle later.
//
// Reconfiguration (neighbourhood grouping). `err_in` is the wired-OR error
// line of the ring. A DRNM that sees one of its PMs newly retired
// (`pm_fail`) becomes the initiator: it raises the error line and, with f
// fault-free PMs left, sends INVITE (f=2), JOIN (f=1) or DONE (f=0) to the
// next participant. Every DRNM with one or two fault-free PMs drops its old
// grouping and answers one request:
//   INVITE: grant it (ACK back), lend one PM to the requester, then send DONE
//           (no PM left) or JOIN (one PM left) onward.
//   JOIN:   with two PMs, grant it, host a triad with the joining PM and send
//           DONE onward; with one PM, send INVITE onward and, if that is
//           granted, host a triad of the upstream PM, its own PM and the
//           downstream PM, and grant the join.
//   DONE:   with two PMs send INVITE onward, with one send JOIN onward.
// When a request comes back round the ring to the initiator, the PMs are
// exhausted: the initiator answers REJECT and drops the error line, which
// ends the reconfiguration everywhere. (It holds the line for N_RING+1 more
// cycles first, so that a grant still on its way upstream is delivered.) At that moment every triad host
// restarts its ADPLL so the new triad's clocks start in step.
//
// A lent PM's raw clock travels on the link as `src_clk`; the host returns
// the corrected clock as `ret_clk` together with its identifier, which the
// lending DRNM reports as the PM's triad tag (`pm_tag`).
// All link outputs are registered: one cycle per hop.
//
// From the document: five ports, ring wiring, the ADPLL with input MUXes and
// output DEMUXes, the bypass switch, the error line and the message rules.
// This design's own: message encoding, cycle timing, the ACK/REJECT replies
// as messages, carrying the host identifier with the returned clock, and
// deferring a failure that occurs during a reconfiguration until it ends.
// Lint: the ADPLL's synchronization clocks (sync_clk) are left unused here;
// the interrupt synchronizer keeps its own per-PM count of the same length.
module drnm
  import gd_pkg::*;
#(
  parameter int unsigned ID       = 0,   // position on the ring
  parameter int unsigned N_RING   = 5,   // DRNMs on the ring (sets the guard time)
  parameter int unsigned DIV      = 16,  // ADPLL synchronisation divider
  parameter int unsigned SKEW_MAX = 2    // ADPLL skew threshold
) (
  input  logic            clk,
  input  logic            rst_n,
  // processor module ports (R2, R3, R4)
  input  logic [2:0]      pm_fail,    // PM retired (sticky)
  input  logic [2:0]      pm_osc,     // raw clock ticks of the PMs
  output logic [2:0]      pm_clk,     // running clocks given to the PMs
  output logic [2:0]      pm_active,  // PM is member of a triad
  output logic [ID_W-1:0] pm_tag [3], // DRNM hosting that triad
  // error line
  input  logic            err_in,     // wired-OR of all err_out
  output logic            err_out,
  // ring ports: R1 toward the next DRNM, R5 toward the previous one
  input  ring_link_t      r1_in,
  output ring_link_t      r1_out,
  input  ring_link_t      r5_in,
  output ring_link_t      r5_out,
  // status
  output logic            bypass,
  output logic            triad_here,  // this DRNM hosts a triad
  output logic            locked,      // hosted triad's clocks are in step
  output logic            initiator,
  output logic [2:0]      n_insert,    // ADPLL pulse corrections
  output logic [2:0]      n_delete
);

  typedef enum logic [3:0] {
    S_IDLE, S_I_START, S_I_WAIT, S_I_DRAIN,
    S_I_GUARD, S_P_WAIT, S_P_INVWAIT, S_P_INVWAIT_J, S_P_JOINWAIT, S_P_END
  } state_t;

  // The initiator keeps the error line up for GUARD cycles after the last
  // request came back, so that a grant still travelling to an upstream DRNM
  // (at most N_RING hops) arrives before the reconfiguration ends.
  localparam int unsigned GUARD = N_RING + 1;
  logic [$clog2(GUARD+1)-1:0] guard_cnt;

  state_t     state;
  clk_src_t   sel [3];
  logic       lend1_v, lend5_v;
  logic [1:0] lend1, lend5;
  logic [2:0] fail_q;
  logic       pending;
  logic       restart;
  msg_t       msg1, msg5;      // messages to send next on R1 / R5

  logic [2:0] alive;
  logic [1:0] f;
  logic [1:0] a0, a1;          // first and second fault-free PM
  logic       new_fail;

  always_comb begin
    alive    = ~pm_fail;
    f        = popcount3(alive);
    new_fail = |(pm_fail & ~fail_q);
    a0 = 2'd0;
    a1 = 2'd0;
    if (alive[0])      begin a0 = 2'd0; a1 = alive[1] ? 2'd1 : 2'd2; end
    else if (alive[1]) begin a0 = 2'd1; a1 = 2'd2; end
    else               begin a0 = 2'd2; a1 = 2'd2; end
  end

  function automatic clk_src_t pm_src(input logic [1:0] k);
    return clk_src_t'(3'(k) + 3'd1);
  endfunction

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sel[0]  <= SRC_P0;
      sel[1]  <= SRC_P1;
      sel[2]  <= SRC_P2;
      lend1_v <= 1'b0;
      lend5_v <= 1'b0;
      lend1   <= '0;
      lend5   <= '0;
      fail_q  <= '0;
      pending <= 1'b0;
      guard_cnt <= '0;
      err_out <= 1'b0;
      bypass  <= 1'b1;
      restart <= 1'b0;
      msg1    <= MSG_NONE;
      msg5    <= MSG_NONE;
    end else begin
      fail_q  <= pm_fail;
      msg1    <= MSG_NONE;
      msg5    <= MSG_NONE;
      restart <= 1'b0;
      if (new_fail) pending <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if ((new_fail || pending) && !err_in) begin
            // this DRNM saw the latest failure: start a reconfiguration
            pending <= 1'b0;
            err_out <= 1'b1;
            bypass  <= 1'b0;
            for (int s = 0; s < 3; s++) sel[s] <= SRC_NONE;
            lend1_v <= 1'b0;
            lend5_v <= 1'b0;
            state   <= S_I_START;
          end else if (f == 2'd3 || f == 2'd0) begin
            // not a participant: local triad (if any) and ring bypass
            bypass <= 1'b1;
            if (f == 2'd3) begin
              sel[0] <= SRC_P0; sel[1] <= SRC_P1; sel[2] <= SRC_P2;
            end else begin
              for (int s = 0; s < 3; s++) sel[s] <= SRC_NONE;
            end
            lend1_v <= 1'b0;
            lend5_v <= 1'b0;
          end else if (err_in) begin
            // participant: decouple the old grouping and wait for a request
            bypass  <= 1'b0;
            for (int s = 0; s < 3; s++) sel[s] <= SRC_NONE;
            lend1_v <= 1'b0;
            lend5_v <= 1'b0;
            state   <= S_P_WAIT;
          end
        end

        // ---------------- initiator
        S_I_START: begin
          unique case (f)
            2'd2:    msg1 <= MSG_INVITE;
            2'd1:    msg1 <= MSG_JOIN;
            default: msg1 <= MSG_DONE;
          endcase
          state <= S_I_WAIT;
        end

        S_I_WAIT, S_I_DRAIN: begin
          if (r5_in.msg inside {MSG_INVITE, MSG_JOIN, MSG_DONE}) begin
            // the request went round the ring: no more PMs to group
            if (r5_in.msg != MSG_DONE) msg5 <= MSG_REJECT;
            guard_cnt <= '0;
            state     <= S_I_GUARD;
          end else if (state == S_I_WAIT && r1_in.msg == MSG_ACK) begin
            state <= S_I_DRAIN;
          end
        end

        S_I_GUARD: begin
          if (guard_cnt == $bits(guard_cnt)'(GUARD - 1)) begin
            err_out <= 1'b0;
            state   <= S_IDLE;
          end else begin
            guard_cnt <= guard_cnt + 1'b1;
          end
        end

        // ---------------- other participants
        S_P_WAIT: begin
          unique case (r5_in.msg)
            MSG_INVITE: begin
              msg5    <= MSG_ACK;
              lend5_v <= 1'b1;
              lend5   <= a0;
              if (f == 2'd1) begin
                msg1  <= MSG_DONE;
                state <= S_P_END;
              end else begin
                msg1  <= MSG_JOIN;
                state <= S_P_JOINWAIT;
              end
            end
            MSG_JOIN: begin
              if (f == 2'd2) begin
                msg5   <= MSG_ACK;
                sel[0] <= pm_src(a0); sel[1] <= pm_src(a1); sel[2] <= SRC_R5;
                msg1   <= MSG_DONE;
                state  <= S_P_END;
              end else begin
                msg1  <= MSG_INVITE;
                state <= S_P_INVWAIT_J;
              end
            end
            MSG_DONE: begin
              if (f == 2'd2) begin
                msg1  <= MSG_INVITE;
                state <= S_P_INVWAIT;
              end else begin
                msg1  <= MSG_JOIN;
                state <= S_P_JOINWAIT;
              end
            end
            default: ;
          endcase
          if (!err_in) state <= S_IDLE;
        end

        S_P_INVWAIT: begin
          if (r1_in.msg == MSG_ACK) begin
            sel[0] <= pm_src(a0); sel[1] <= pm_src(a1); sel[2] <= SRC_R1;
            state  <= S_P_END;
          end else if (r1_in.msg == MSG_REJECT) begin
            state <= S_P_END;
          end
          if (!err_in) state <= S_IDLE;
        end

        S_P_INVWAIT_J: begin
          if (r1_in.msg == MSG_ACK) begin
            sel[0] <= pm_src(a0); sel[1] <= SRC_R5; sel[2] <= SRC_R1;
            msg5   <= MSG_ACK;
            state  <= S_P_END;
          end else if (r1_in.msg == MSG_REJECT) begin
            state <= S_P_END;
          end
          if (!err_in) state <= S_IDLE;
        end

        S_P_JOINWAIT: begin
          if (r1_in.msg == MSG_ACK) begin
            // the remaining PM goes to the next DRNM
            lend1_v <= 1'b1;
            lend1   <= (lend5_v) ? a1 : a0;
            state   <= S_P_END;
          end
          if (!err_in) state <= S_IDLE;
        end

        S_P_END: if (!err_in) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase

      // The grant of the initiator's own request may come back after the
      // last request has (it can travel more hops), so it is taken in any
      // initiator state.
      if (state inside {S_I_WAIT, S_I_DRAIN, S_I_GUARD} && r1_in.msg == MSG_ACK) begin
        if (f == 2'd2) begin
          sel[0] <= pm_src(a0); sel[1] <= pm_src(a1); sel[2] <= SRC_R1;
        end else begin
          lend1_v <= 1'b1;
          lend1   <= a0;
        end
      end

      // every DRNM restarts its ADPLL when the error line drops
      if (state != S_IDLE && !initiator && !err_in) restart <= 1'b1;
      if (state == S_I_GUARD && guard_cnt == $bits(guard_cnt)'(GUARD - 1)) restart <= 1'b1;
    end
  end

  assign initiator = state inside {S_I_START, S_I_WAIT, S_I_DRAIN, S_I_GUARD};

  // ------------------------------------------------------- clock switching
  logic [2:0] slice_in, slice_en, slice_out, sync_clk;

  always_comb begin
    for (int s = 0; s < 3; s++) begin
      slice_en[s] = (sel[s] != SRC_NONE);
      unique case (sel[s])
        SRC_P0:  slice_in[s] = pm_osc[0];
        SRC_P1:  slice_in[s] = pm_osc[1];
        SRC_P2:  slice_in[s] = pm_osc[2];
        SRC_R1:  slice_in[s] = r1_in.src_clk;
        SRC_R5:  slice_in[s] = r5_in.src_clk;
        default: slice_in[s] = 1'b0;
      endcase
    end
  end

  adpll #(.DIV(DIV), .SKEW_MAX(SKEW_MAX)) u_adpll (
    .clk, .rst_n,
    .restart,
    .en      (slice_en),
    .tick_in (slice_in),
    .tick_out(slice_out),
    .sync_clk,
    .locked,
    .n_insert,
    .n_delete
  );

  assign triad_here = &slice_en;

  // demultiplexers: running clocks and triad tags back to the PMs
  always_comb begin
    for (int k = 0; k < 3; k++) begin
      pm_clk[k]    = 1'b0;
      pm_active[k] = 1'b0;
      pm_tag[k]    = ID_W'(ID);
      for (int s = 0; s < 3; s++) begin
        if (sel[s] == pm_src(2'(k))) begin
          pm_clk[k]    = slice_out[s];
          pm_active[k] = triad_here;
        end
      end
      if (lend1_v && lend1 == 2'(k)) begin
        pm_clk[k]    = r1_in.ret_clk;
        pm_active[k] = r1_in.host_valid;
        pm_tag[k]    = r1_in.host_id;
      end
      if (lend5_v && lend5 == 2'(k)) begin
        pm_clk[k]    = r5_in.ret_clk;
        pm_active[k] = r5_in.host_valid;
        pm_tag[k]    = r5_in.host_id;
      end
    end
  end

  // ring outputs: registered, either bypassed or driven by this DRNM
  ring_link_t r1_nxt, r5_nxt;

  always_comb begin
    r1_nxt = '0;
    r5_nxt = '0;
    r1_nxt.msg = msg1;
    r5_nxt.msg = msg5;
    if (lend1_v) r1_nxt.src_clk = pm_osc[lend1];
    if (lend5_v) r5_nxt.src_clk = pm_osc[lend5];
    for (int s = 0; s < 3; s++) begin
      if (sel[s] == SRC_R1 && triad_here) begin
        r1_nxt.ret_clk    = slice_out[s];
        r1_nxt.host_valid = 1'b1;
        r1_nxt.host_id    = ID_W'(ID);
      end
      if (sel[s] == SRC_R5 && triad_here) begin
        r5_nxt.ret_clk    = slice_out[s];
        r5_nxt.host_valid = 1'b1;
        r5_nxt.host_id    = ID_W'(ID);
      end
    end
    if (bypass && !initiator) begin
      r1_nxt = r5_in;
      r5_nxt = r1_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_out <= '0;
      r5_out <= '0;
    end else begin
      r1_out <= r1_nxt;
      r5_out <= r5_nxt;
    end
  end

endmodule
