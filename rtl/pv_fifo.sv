// pv_fifo: input buffer of one channel of a pipelined voter, also used as the
// per-processor write queue on the MAT bus.
//
// A circular buffer of DEPTH words with head and tail pointers. The channel
// writes at the tail (wr_en, one word per cycle while not full); the reader
// sees the head word and a ready bit that is set while the buffer holds at
// least one word, and removes the head with pop. `full` tells the channel to
// stop writing. A write and a pop may happen in the same cycle; `flush`
// empties the buffer and takes precedence over both. The 8-word
// depth is the document's simulated voter; one clock for both sides is this
// design's choice (the writer is assumed to be synchronised to it).
// Lint: rst_n is also sampled by the overflow assertion's disable clause,
// which the linter reports as a synchronous use of an asynchronous reset.
module pv_fifo #(
  parameter int unsigned W     = 32,  // word width
  parameter int unsigned DEPTH = 8    // words
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,    // drop all buffered words
  input  logic                       wr_en,
  input  logic [W-1:0]               wr_data,
  output logic                       full,
  output logic                       ready,    // at least one word buffered
  output logic [W-1:0]               head,     // oldest word
  input  logic                       pop,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;
  logic          do_wr, do_rd;

  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign ready = (count != '0);
  assign head  = mem[rd_ptr];
  assign do_wr = wr_en && !full;
  assign do_rd = pop && ready;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (flush) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) 32'(count) <= DEPTH);

endmodule
