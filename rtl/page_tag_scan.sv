// page_tag_scan: update tags of the memory pages and the scanner that
// realigns the memory state after a fault.
//
// The main memory of MEM_WORDS words is divided into K pages of PAGE_WORDS
// words. Every write that reaches memory sets the update tag of its page.
// On `start` the scanner walks the K tags, one tag per vote time (clock
// cycle). For each tag that is set it issues the addresses of all words of
// that page, one per cycle, to the voter on rv_valid/rv_addr. The voter
// reads the word from the redundant copies, votes and writes it back, and
// takes the address with rv_ready. The tag is cleared once its last word
// has been taken. A full scan with F tagged pages and rv_ready held high
// therefore takes exactly K + F * PAGE_WORDS cycles from `start` to `done`.
// The last page may be shorter when K does not divide MEM_WORDS.
//
// Timing: `start` is sampled in the idle state; `busy` is high from the
// next cycle until `done`, a one-cycle pulse in the cycle after the last
// tag or word. A write and a tag clear of the same page in the same cycle
// leave the tag set.
//
// From the document: update tag bits per page, realignment of tagged pages
// only, the time (K + F W/K) vote times, and 4 * 10^6 words in 6320 pages
// as the optimum example. This design's own: one tag and one word per
// cycle, rounding the page size up, the handshake with the voter, tags
// cleared at reset, and that the memory address sits in bits [31:8] of
// the bus word.
module page_tag_scan #(
  parameter int unsigned MEM_WORDS = 4000000,  // words of main memory
  parameter int unsigned K         = 6320,     // number of pages
  parameter int unsigned AW        = 24        // address width
) (
  input  logic          clk,
  input  logic          rst_n,
  // memory writes
  input  logic          wr_valid,
  input  logic [AW-1:0] wr_addr,
  // realignment
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          rv_valid,   // word to realign
  output logic [AW-1:0] rv_addr,
  input  logic          rv_ready,   // voter takes the word
  output logic [$clog2(K+1)-1:0] n_tagged  // pages tagged now
);

  localparam int unsigned PAGE_WORDS = (MEM_WORDS + K - 1) / K;
  localparam int unsigned KW = $clog2(K);
  localparam int unsigned PW = $clog2(PAGE_WORDS + 1);

  typedef enum logic [1:0] {S_IDLE, S_SCAN, S_PAGE} state_t;
  state_t         state;
  logic [K-1:0]   tag;
  logic [KW-1:0]  idx;        // tag being looked at
  logic [AW-1:0]  base;       // first word of page idx
  logic [PW-1:0]  off;        // word within the page
  logic [PW-1:0]  last_off;   // last word of page idx

  // page of the written word
  logic          wr_hit;
  logic [KW-1:0] wr_page;
  always_comb begin
    wr_hit  = wr_valid && (32'(wr_addr) < MEM_WORDS);
    wr_page = KW'(32'(wr_addr) / PAGE_WORDS);
  end

  always_comb begin
    if (32'(base) + PAGE_WORDS > MEM_WORDS) last_off = PW'(MEM_WORDS - 32'(base) - 1);
    else                                     last_off = PW'(PAGE_WORDS - 1);
  end

  logic clear;
  assign clear = (state == S_PAGE) && rv_ready && (off == last_off);

  // one flip-flop per tag, set by a write to its page, cleared after the
  // page's realignment
  for (genvar k = 0; k < K; k++) begin : g_tag
    logic t;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                            t <= 1'b0;
      else if (wr_hit && wr_page == KW'(k)) t <= 1'b1;
      else if (clear && idx == KW'(k))      t <= 1'b0;
    end
    assign tag[k] = t;
  end

  // count of tagged pages, kept alongside the tags
  logic tag_new, tag_gone;
  always_comb begin
    tag_new  = wr_hit && !tag[wr_page];
    tag_gone = clear && !(wr_hit && wr_page == idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    n_tagged <= '0;
    else if (tag_new && !tag_gone) n_tagged <= n_tagged + 1'b1;
    else if (tag_gone && !tag_new) n_tagged <= n_tagged - 1'b1;
  end

  // move to the next tag, or finish after the last one
  logic last_tag;
  assign last_tag = (idx == KW'(K - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      base  <= '0;
      off   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          idx   <= '0;
          base  <= '0;
          off   <= '0;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (tag[idx]) begin
            off   <= '0;
            state <= S_PAGE;
          end else if (last_tag) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            idx  <= idx + 1'b1;
            base <= base + AW'(PAGE_WORDS);
          end
        end
        S_PAGE: if (rv_ready) begin
          if (off == last_off) begin
            if (last_tag) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              idx   <= idx + 1'b1;
              base  <= base + AW'(PAGE_WORDS);
              state <= S_SCAN;
            end
          end else begin
            off <= off + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign rv_valid = (state == S_PAGE);
  assign rv_addr  = base + AW'(off);

endmodule
