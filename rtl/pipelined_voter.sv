// pipelined_voter: TMR pipelined voter (PV) placed between the caches of a
// processor triad and main memory.
//
// Each of the three channels writes its outgoing words into its own input
// buffer (pv_fifo) and goes on computing; it is stopped only when its buffer
// is full. A channel's buffer sets its ready bit while it holds a word. The
// vote enable is the AND of the three ready bits and of the memory being
// able to take a word: the three head words are then voted bit by bit
// (majority_voter), removed from the buffers, and the voted word is presented
// to memory in the next cycle. A channel that disagrees with the majority is
// masked and reported in `fault_mask`. A time-out watchdog reports channels
// that leave the others waiting too long.
//
// Timing: a word written in cycle t can be voted in cycle t+1 at the
// earliest, and mem_valid rises in the cycle after the vote. One vote per
// cycle while all buffers hold words and mem_ready is high.
// From the document: the buffers with ready bits, the AND-gated vote enable,
// the bit-wise majority voter, the watchdog and the 8-word buffer depth.
// This design's choices: single clock, a one-cycle vote, the valid/ready
// memory port and the fault report outputs.
// Lint: the buffers' fill counts are not needed and left open; rst_n is
// also sampled by the output-hold assertion's disable clause.
module pipelined_voter #(
  parameter int unsigned W       = 32,  // word width (address and data)
  parameter int unsigned DEPTH   = 8,   // words per channel buffer
  parameter int unsigned TIMEOUT = 64   // watchdog time-out in cycles
) (
  input  logic         clk,
  input  logic         rst_n,
  // computing channels
  input  logic [2:0]   ch_wr,
  input  logic [W-1:0] ch_data [3],
  output logic [2:0]   ch_full,
  // main memory
  output logic         mem_valid,
  output logic [W-1:0] mem_data,
  input  logic         mem_ready,
  // fault reports
  output logic         fault_valid,  // a vote masked a disagreeing channel
  output logic [2:0]   fault_mask,   // channels that disagreed
  output logic         timeout,      // watchdog fired
  output logic [2:0]   stalled       // channels not ready at the time-out
);

  logic [2:0]   ready;
  logic [W-1:0] head [3];
  logic         vote;
  logic [W-1:0] maj;
  logic [2:0]   disagree;
  logic         mismatch;

  for (genvar i = 0; i < 3; i++) begin : g_ch
    pv_fifo #(.W(W), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .flush  (1'b0),
      .wr_en  (ch_wr[i]),
      .wr_data(ch_data[i]),
      .full   (ch_full[i]),
      .ready  (ready[i]),
      .head   (head[i]),
      .pop    (vote),
      .count  ()
    );
  end

  // Vote enable: all ready bits set and the output register free or draining.
  assign vote = (&ready) && (!mem_valid || mem_ready);

  majority_voter #(.W(W)) u_voter (
    .a(head[0]), .b(head[1]), .c(head[2]),
    .maj, .disagree, .mismatch
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_valid   <= 1'b0;
      mem_data    <= '0;
      fault_valid <= 1'b0;
      fault_mask  <= '0;
    end else begin
      fault_valid <= 1'b0;
      if (vote) begin
        mem_valid   <= 1'b1;
        mem_data    <= maj;
        fault_valid <= mismatch;
        fault_mask  <= disagree;
      end else if (mem_ready) begin
        mem_valid <= 1'b0;
      end
    end
  end

  vote_watchdog #(.TIMEOUT(TIMEOUT)) u_wd (
    .clk, .rst_n,
    .ready,
    .vote,
    .timeout,
    .stalled
  );

  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_valid && !mem_ready |=> mem_valid && $stable(mem_data));

endmodule
