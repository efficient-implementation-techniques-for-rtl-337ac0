// mat_node: the MAT (monitoring-at-transmission) bus interface of one
// processor module.
//
// The PM places its outgoing writes (address and data) in a write queue
// (pv_fifo) and goes on computing; the queue's ready bit is this PM's
// request to the bus arbiter. When the arbiter grants the bus to the triad
// this PM belongs to (`grant_id` equal to the PM's triad tag), the PM drives
// the head word onto the wired-AND bus; everybody else drives all ones. While
// driving, the PM compares the bus value with its own word. Any difference
// means the triad members disagree: the PM asserts `invalidate` (a wired-OR
// line) and the transfer is cancelled and retried. A transfer that no member
// invalidates is taken by memory and removed from every member's queue.
// After MAX_RETRY invalidated attempts in a row the fault is taken as
// permanent: `perm_fault` is raised for the PM's error handler, which
// decides which PM to retire, and the node stops requesting until
// `clear_fault`. When the PM leaves its triad (`active` falls during a
// reconfiguration) its queue is emptied.
//
// Timing: the grant is a registered one-cycle strobe; driving, compare and
// invalidate are combinational within that cycle, and the queue pops at its
// end.
// From the document: queue per PM, ready bits to the arbiter, monitoring of
// the own output on the bus, invalidation and retry, a permanent fault after
// several retries. This design's own: wired-AND polarity, the retry limit,
// stopping after a permanent fault, and emptying the queue on leaving a
// triad.
// Lint: the queue's fill count is not needed and left open.
module mat_node
  import gd_pkg::*;
#(
  parameter int unsigned W         = 32,  // bus word: address and data
  parameter int unsigned DEPTH     = 8,   // write queue words
  parameter int unsigned MAX_RETRY = 3    // attempts before a permanent fault
) (
  input  logic            clk,
  input  logic            rst_n,
  // processor side
  input  logic            wr_en,
  input  logic [W-1:0]    wr_data,
  output logic            full,
  output logic            perm_fault,
  input  logic            clear_fault,
  // triad membership from the DRN
  input  logic            active,
  input  logic [ID_W-1:0] tag,
  // arbiter and bus
  output logic            ready,       // request: a word is waiting
  input  logic            grant_valid,
  input  logic [ID_W-1:0] grant_id,
  output logic [W-1:0]    drive,       // this node's contribution to the wired-AND
  input  logic [W-1:0]    bus,         // resolved bus value
  output logic            invalidate,  // this node saw a mismatch
  input  logic            inval_bus,   // wired-OR of all invalidate lines
  output logic            committed    // a word of this node was taken by memory
);

  localparam int unsigned RW = $clog2(MAX_RETRY + 1);

  logic          q_ready;
  logic [W-1:0]  head;
  logic          mine;
  logic [RW-1:0] retries;

  assign mine       = grant_valid && active && (tag == grant_id) && q_ready && !perm_fault;
  assign drive      = mine ? head : '1;
  assign invalidate = mine && (bus != head);
  assign committed  = mine && !inval_bus;
  assign ready      = q_ready && active && !perm_fault;

  // A PM that leaves its triad (reconfiguration) drops its queued writes:
  // its state is saved and restored by the processors, not by the queue.
  logic active_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) active_q <= 1'b0;
    else        active_q <= active;
  end

  pv_fifo #(.W(W), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .flush  (active_q && !active),
    .wr_en,
    .wr_data,
    .full,
    .ready  (q_ready),
    .head,
    .pop    (committed),
    .count  ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      retries    <= '0;
      perm_fault <= 1'b0;
    end else begin
      if (clear_fault) begin
        perm_fault <= 1'b0;
        retries    <= '0;
      end else if (mine) begin
        if (!inval_bus) begin
          retries <= '0;
        end else if (retries == RW'(MAX_RETRY - 1)) begin
          retries    <= '0;
          perm_fault <= 1'b1;
        end else begin
          retries <= retries + 1'b1;
        end
      end
    end
  end

endmodule
