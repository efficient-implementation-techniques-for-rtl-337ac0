// gd_pkg: shared types and constants of the gracefully degradable cluster.
//
// The cluster is built from processor modules (PMs) grouped three at a time
// into triads. Clock and control signals of the PMs are switched by a ring of
// reconfiguration modules (DRNMs, see drnm.sv); data writes of a triad are
// checked on a monitored shared bus (MAT bus, see mat_node.sv) or voted in a
// pipelined voter (see pipelined_voter.sv).
//
// Everything here runs in one sampling clock domain. A "clock" of a PM is
// carried as a one-cycle tick (an enable), so oscillator pulses can be added
// and deleted by the ADPLL logic without gated clocks. The message set of the
// ring follows the neighbourhood-grouping algorithm (invite, join, done) plus
// the two replies it uses (grant, written ACK here, and reject); the encoding
// is this design's own.
package gd_pkg;

  // Width of a DRNM identifier carried on the ring (up to 256 DRNMs).
  localparam int unsigned ID_W = 8;

  // Ring messages. Requests travel with the ring direction, replies against it.
  typedef enum logic [2:0] {
    MSG_NONE   = 3'd0,
    MSG_INVITE = 3'd1,  // sender needs one more PM to form a triad
    MSG_JOIN   = 3'd2,  // sender has one PM that can join a triad elsewhere
    MSG_DONE   = 3'd3,  // everything up to the sender is grouped
    MSG_ACK    = 3'd4,  // reply: request granted
    MSG_REJECT = 3'd5   // reply: request refused (sent by the initiator)
  } msg_t;

  // One direction of a ring link between two neighbouring DRNMs.
  typedef struct packed {
    msg_t            msg;         // message, valid for one cycle
    logic            src_clk;     // raw clock tick of a PM lent to the far DRNM
    logic            ret_clk;     // corrected clock tick returned to a lent PM
    logic            host_valid;  // host_id below is meaningful
    logic [ID_W-1:0] host_id;     // DRNM that hosts the triad of the lent PM
  } ring_link_t;

  // Source selected by one ADPLL slice of a DRNM: one of the three local
  // access ports (R2..R4) or one of the two ring ports (R1, R5).
  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,
    SRC_P0   = 3'd1,
    SRC_P1   = 3'd2,
    SRC_P2   = 3'd3,
    SRC_R1   = 3'd4,  // ring port toward the next DRNM
    SRC_R5   = 3'd5   // ring port toward the previous DRNM
  } clk_src_t;

  function automatic logic [1:0] popcount3(input logic [2:0] v);
    return {1'b0, v[0]} + {1'b0, v[1]} + {1'b0, v[2]};
  endfunction

endpackage
